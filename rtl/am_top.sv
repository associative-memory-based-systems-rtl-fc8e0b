// am_top: the two associative memories side by side.
//
// m_*: the bank-type nearest-Manhattan-distance memory (4 banks x 64 words
// of 16 five-bit units, 256 reference patterns), see bank_am_system.
// h_*: the nearest-Hamming-distance memory (32 words of 768 bits), see
// hamming_am.  The two share only clock and reset.
module am_top #(
  parameter int unsigned NB = am_pkg::MAN_NB,
  parameter int unsigned R  = am_pkg::MAN_R,
  parameter int unsigned W  = am_pkg::MAN_W,
  parameter int unsigned K  = am_pkg::MAN_K,
  parameter int unsigned HR = am_pkg::HAM_R,
  parameter int unsigned HW = am_pkg::HAM_W,
  localparam int unsigned WB  = W * K,
  localparam int unsigned AW  = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned BW  = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned DW  = am_pkg::dist_width(W, K),
  localparam int unsigned HAW = (HR > 1) ? $clog2(HR) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // Manhattan bank-type memory
  input  logic [NB-1:0]    m_bank_en,
  input  logic             m_wr_en,
  input  logic [BW+AW-1:0] m_addr,
  input  logic [WB-1:0]    m_wdata,
  input  logic             m_rd_en,
  input  logic             m_rd_winner,
  output logic [WB-1:0]    m_rdata,
  output logic             m_rdata_valid,
  input  logic             m_search,
  input  logic [WB-1:0]    m_search_word,
  output logic             m_win_valid,
  output logic             m_win_found,
  output logic [BW-1:0]    m_win_bank,
  output logic [AW-1:0]    m_win_row,
  output logic [DW-1:0]    m_win_dist,
  // Hamming memory
  input  logic             h_en,
  input  logic             h_wr_en,
  input  logic [HAW-1:0]   h_addr,
  input  logic [HW-1:0]    h_wdata,
  input  logic             h_rd_en,
  output logic [HW-1:0]    h_rdata,
  input  logic             h_search,
  input  logic [HW-1:0]    h_search_word,
  output logic             h_match_valid,
  output logic [HR-1:0]    h_match
);

  bank_am_system #(.NB(NB), .R(R), .W(W), .K(K)) u_manhattan (
    .clk, .rst_n,
    .bank_en    (m_bank_en),
    .wr_en      (m_wr_en),
    .addr       (m_addr),
    .wdata      (m_wdata),
    .rd_en      (m_rd_en),
    .rd_winner  (m_rd_winner),
    .rdata      (m_rdata),
    .rdata_valid(m_rdata_valid),
    .search     (m_search),
    .search_word(m_search_word),
    .win_valid  (m_win_valid),
    .win_found  (m_win_found),
    .win_bank   (m_win_bank),
    .win_row    (m_win_row),
    .win_dist   (m_win_dist)
  );

  hamming_am #(.R(HR), .W(HW)) u_hamming (
    .clk, .rst_n,
    .en         (h_en),
    .wr_en      (h_wr_en),
    .addr       (h_addr),
    .wdata      (h_wdata),
    .rd_en      (h_rd_en),
    .rdata      (h_rdata),
    .search     (h_search),
    .search_word(h_search_word),
    .match_valid(h_match_valid),
    .match      (h_match)
  );

endmodule

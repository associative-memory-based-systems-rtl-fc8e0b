// bank_am_system: bank-type nearest-Manhattan-distance associative memory.
//
// NB banks of R reference words each (default 4 x 64 = 256 words of 16
// five-bit units) search the same input word in parallel.  Every bank
// reports its local winner's row and distance; a tournament of distance
// comparators then picks the global winner and outputs its bank number,
// bank-internal row and winner-input distance.  Bank enables (bank_en)
// implement bank-selective activation: a disabled bank does not search and
// cannot win, which saves the power of its search circuits when the
// reference space is partitioned so that the winner's bank is known.
//
// Addressing: addr = {bank, row}.  A write stores wdata in that row; a read
// (rd_en) returns the row one cycle later on rdata, or, with rd_winner set,
// the reference word of the last global winner.
//
// Timing, a two-stage pipeline: search at edge t -> local winners
// registered in the banks at t+1 -> global winner on win_* at t+2.  A new
// search may start every cycle.
module bank_am_system #(
  parameter int unsigned NB = am_pkg::MAN_NB,
  parameter int unsigned R  = am_pkg::MAN_R,
  parameter int unsigned W  = am_pkg::MAN_W,
  parameter int unsigned K  = am_pkg::MAN_K,
  localparam int unsigned WB = W * K,
  localparam int unsigned AW = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned DW = am_pkg::dist_width(W, K)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NB-1:0]    bank_en,
  input  logic             wr_en,
  input  logic [BW+AW-1:0] addr,
  input  logic [WB-1:0]    wdata,
  input  logic             rd_en,
  input  logic             rd_winner,
  output logic [WB-1:0]    rdata,
  output logic             rdata_valid,
  input  logic             search,
  input  logic [WB-1:0]    search_word,
  output logic             win_valid,
  output logic             win_found,
  output logic [BW-1:0]    win_bank,
  output logic [AW-1:0]    win_row,
  output logic [DW-1:0]    win_dist
);

  logic [NB-1:0]    loc_valid;
  logic [NB-1:0]    loc_found;
  logic [NB*AW-1:0] loc_addr;
  logic [NB*DW-1:0] loc_dist;
  logic [NB*WB-1:0] bank_rdata;
  logic [BW-1:0]    a_bank;
  logic [AW-1:0]    a_row;
  logic [BW-1:0]    rd_bank_q;
  logic [BW-1:0]    last_bank;

  assign {a_bank, a_row} = addr;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [R-1:0] match_unused;
    am_bank #(.R(R), .W(W), .K(K)) u_bank (
      .clk, .rst_n,
      .en         (bank_en[b]),
      .wr_en      (wr_en && (a_bank == BW'(b))),
      .addr       (a_row),
      .wdata,
      .rd_en,
      .rd_winner,
      .rdata      (bank_rdata[b*WB +: WB]),
      .search,
      .search_word,
      .loc_valid  (loc_valid[b]),
      .loc_found  (loc_found[b]),
      .loc_addr   (loc_addr[b*AW +: AW]),
      .loc_dist   (loc_dist[b*DW +: DW]),
      .match      (match_unused)
    );
  end

  global_winner_select #(.NB(NB), .DW(DW), .AW(AW)) u_gws (
    .clk, .rst_n,
    .in_valid (loc_valid[0]),
    .loc_found,
    .loc_dist,
    .loc_addr,
    .out_valid(win_valid),
    .g_found  (win_found),
    .g_bank   (win_bank),
    .g_addr   (win_row),
    .g_dist   (win_dist)
  );

  // Read-out: every bank reads its row (its own 2-1 Sel picks its local
  // winner's row when rd_winner is set); the bank of the request, or the
  // global winner's bank, is chosen one cycle later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank_q   <= '0;
      rdata_valid <= 1'b0;
      last_bank   <= '0;
    end else begin
      rdata_valid <= rd_en;
      if (rd_en) rd_bank_q <= rd_winner ? last_bank : a_bank;
      if (win_valid && win_found) last_bank <= win_bank;
    end
  end

  assign rdata = bank_rdata[rd_bank_q*WB +: WB];

endmodule

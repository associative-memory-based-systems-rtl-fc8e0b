// hamming_am: fully-parallel nearest-Hamming-distance associative memory.
//
// R reference words of W bits (default 32 x 768).  Every stored bit has a
// bit comparator (XOR with the search bit); each row's word comparator
// counts the mismatches into C_i, the Hamming distance; the winner line-up
// amplifier and the winner-take-all circuit then raise the match signal M_i
// of the row, or rows, at minimum distance.  The match signals are the
// memory's search result; rows at equal minimum distance are all flagged.
//
// Timing: search/search_word are sampled at a clock edge, match and
// match_valid follow at the next edge.  A write stores wdata at addr; a read
// returns the row on rdata one cycle after rd_en.  With en low no search
// is made and match stays 0.
module hamming_am #(
  parameter int unsigned R  = am_pkg::HAM_R,
  parameter int unsigned W  = am_pkg::HAM_W,
  localparam int unsigned AW = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned DW = am_pkg::dist_width(W, 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          wr_en,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  input  logic          rd_en,
  output logic [W-1:0]  rdata,
  input  logic          search,
  input  logic [W-1:0]  search_word,
  output logic          match_valid,
  output logic [R-1:0]  match
);

  localparam int unsigned LAW = 12;

  logic [R*W-1:0]   cells;
  logic [R*W-1:0]   mism;
  logic [R*DW-1:0]  c_dist;
  logic [R*LAW-1:0] la;
  logic [DW-1:0]   fb;   // WLA feedback level, observable only
  logic [R-1:0]     m;

  storage_field #(.R(R), .W(W), .K(1)) u_field (
    .clk, .rst_n, .wr_en, .wr_addr(addr), .wdata,
    .rd_en, .rd_addr(addr), .rdata, .cells
  );

  for (genvar i = 0; i < R; i++) begin : g_row
    bit_comparator #(.W(W)) u_bc (
      .sw(search_word), .ref_bits(cells[i*W +: W]), .mismatch(mism[i*W +: W])
    );
    word_comparator #(.W(W), .K(1), .HAS_COR(1'b0)) u_wc (
      .mag(mism[i*W +: W]), .cor('0), .c_dist(c_dist[i*DW +: DW])
    );
  end

  wla #(.R(R), .DW(DW), .GAIN(20), .LAW(LAW)) u_wla (
    .en, .c_dist, .la, .fb
  );

  wta #(.R(R), .LAW(LAW), .STAGES(5), .GAIN(5)) u_wta (
    .la, .m
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match_valid <= 1'b0;
      match       <= '0;
    end else begin
      match_valid <= search;
      if (search) match <= en ? m : '0;
    end
  end

endmodule

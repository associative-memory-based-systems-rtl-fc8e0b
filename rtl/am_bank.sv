// am_bank: one fully-parallel nearest-Manhattan-distance search bank.
//
// The memory field holds R reference words of W units of K bits.  On a
// search every row's W unit comparators form |SW - REF| per unit, the row's
// word comparator sums them into C_i, the winner line-up amplifier lifts
// the row(s) with the smallest C_i clear of the rest, and the winner-take-
// all circuit marks them on the match lines M_i.  The priority encoder
// turns the match lines into the winner's row address; the digital tree
// adder then adds the unit-comparator outputs of that row, giving the
// winner-input distance that the global selection compares between banks.
// A 2-1 selector feeds the row decoder either the external address or the
// last winner's address, so the winner's reference word can be read out.
//
// Timing: search/search_word are sampled at a clock edge; the search itself
// (analog in the original, combinational here) completes within that cycle
// and loc_valid/loc_found/loc_addr/loc_dist/match are valid from the next
// edge, one cycle later, for one cycle.  One search per cycle.  Reads
// return rdata one cycle after rd_en.  With en low the bank does not
// search: loc_valid still follows search, loc_found is 0 and match is 0.
// Searching sees the contents as they were before a write in the same
// cycle.
module am_bank #(
  parameter int unsigned R  = am_pkg::MAN_R,
  parameter int unsigned W  = am_pkg::MAN_W,
  parameter int unsigned K  = am_pkg::MAN_K,
  localparam int unsigned WB = W * K,
  localparam int unsigned AW = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned DW = am_pkg::dist_width(W, K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // bank enable (En)
  // read / write periphery
  input  logic          wr_en,
  input  logic [AW-1:0] addr,
  input  logic [WB-1:0] wdata,
  input  logic          rd_en,
  input  logic          rd_winner,   // 2-1 Sel: read the winner's row
  output logic [WB-1:0] rdata,
  // search
  input  logic          search,
  input  logic [WB-1:0] search_word,
  output logic          loc_valid,
  output logic          loc_found,
  output logic [AW-1:0] loc_addr,    // Win_Addr
  output logic [DW-1:0] loc_dist,    // Win_Dist
  output logic [R-1:0]  match        // M_1..M_R
);

  localparam int unsigned LAW = 12;
  localparam int unsigned UW  = K + 1;   // one unit's distance, mag + cor

  logic [R*WB-1:0] cells;
  logic [R*WB-1:0] mag;
  logic [R*W-1:0]  cor;
  logic [R*DW-1:0] c_dist;
  logic [R*LAW-1:0] la;
  logic [DW-1:0]   fb;   // WLA feedback level, observable only
  logic [R-1:0]    m;
  logic            pe_found;
  logic [AW-1:0]   pe_addr;
  logic [W*UW-1:0] win_units;
  logic [UW+((W > 1) ? $clog2(W) : 1)-1:0] win_sum;
  logic [AW-1:0]   rd_addr;
  logic [AW-1:0]   last_win;

  // 2-1 Sel in front of the row decoder
  assign rd_addr = rd_winner ? last_win : addr;

  storage_field #(.R(R), .W(W), .K(K)) u_field (
    .clk, .rst_n, .wr_en, .wr_addr(addr), .wdata,
    .rd_en, .rd_addr, .rdata, .cells
  );

  for (genvar i = 0; i < R; i++) begin : g_row
    for (genvar j = 0; j < W; j++) begin : g_unit
      unit_comparator #(.K(K)) u_uc (
        .sw      (search_word[j*K +: K]),
        .ref_bits(cells[i*WB + j*K +: K]),
        .out_mag (mag[i*WB + j*K +: K]),
        .out_cor (cor[i*W + j])
      );
    end
    word_comparator #(.W(W), .K(K), .HAS_COR(1'b1)) u_wc (
      .mag   (mag[i*WB +: WB]),
      .cor   (cor[i*W +: W]),
      .c_dist(c_dist[i*DW +: DW])
    );
  end

  wla #(.R(R), .DW(DW), .GAIN(20), .LAW(LAW)) u_wla (
    .en, .c_dist, .la, .fb
  );

  wta #(.R(R), .LAW(LAW), .STAGES(5), .GAIN(5)) u_wta (
    .la, .m
  );

  priority_encoder #(.R(R)) u_pe (
    .m, .found(pe_found), .addr(pe_addr)
  );

  // unit outputs of the winner row, read out on the columns
  always_comb
    for (int j = 0; j < W; j++)
      win_units[j*UW +: UW] = {1'b0, mag[pe_addr*WB + j*K +: K]} + UW'(cor[pe_addr*W + j]);

  tree_adder #(.N(W), .IW(UW)) u_tree (
    .in_vals(win_units), .sum(win_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loc_valid <= 1'b0;
      loc_found <= 1'b0;
      loc_addr  <= '0;
      loc_dist  <= '0;
      match     <= '0;
      last_win  <= '0;
    end else begin
      loc_valid <= search;
      if (search) begin
        loc_found <= en & pe_found;
        loc_addr  <= pe_addr;
        loc_dist  <= DW'(win_sum);
        match     <= en ? m : '0;
        if (en & pe_found) last_win <= pe_addr;
      end
    end
  end

endmodule

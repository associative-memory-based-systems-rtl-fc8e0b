// global_winner_select: tournament search for the global winner.
//
// NB local winners (distance and bank-internal address) enter a binary tree
// of dist_comp_sel nodes; each round halves the candidates, so NB = 4 needs
// two rounds (three nodes).  The bank number travels with each candidate as
// the upper address bits, so the output names the global winner's bank and
// its row.  The result is registered: in_valid with its candidates at one
// edge gives out_valid and the result at the next.  NB must be a power of
// two.
module global_winner_select #(
  parameter int unsigned NB = 4,
  parameter int unsigned DW = 9,
  parameter int unsigned AW = 6,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NB-1:0]    loc_found,
  input  logic [NB*DW-1:0] loc_dist,
  input  logic [NB*AW-1:0] loc_addr,
  output logic             out_valid,
  output logic             g_found,
  output logic [BW-1:0]    g_bank,
  output logic [AW-1:0]    g_addr,
  output logic [DW-1:0]    g_dist
);

  localparam int unsigned LV = BW;
  localparam int unsigned TW = BW + AW;   // {bank, row}

  // Round 0 holds the banks' candidates; round l holds NB >> l winners.
  logic          lv_v [NB];
  logic [DW-1:0] lv_d [NB];
  logic [TW-1:0] lv_a [NB];

  for (genvar i = 0; i < NB; i++) begin : g_leaf
    assign lv_v[i] = loc_found[i];
    assign lv_d[i] = loc_dist[i*DW +: DW];
    assign lv_a[i] = {BW'(i), loc_addr[i*AW +: AW]};
  end

  for (genvar l = 1; l <= LV; l++) begin : g_round
    localparam int unsigned NN = NB >> l;
    logic          yv [NN];
    logic [DW-1:0] yd [NN];
    logic [TW-1:0] ya [NN];
    for (genvar i = 0; i < NN; i++) begin : g_node
      if (l == 1) begin : g_first
        dist_comp_sel #(.DW(DW), .AW(TW)) u_node (
          .a_valid(lv_v[2*i]),   .a_dist(lv_d[2*i]),   .a_addr(lv_a[2*i]),
          .b_valid(lv_v[2*i+1]), .b_dist(lv_d[2*i+1]), .b_addr(lv_a[2*i+1]),
          .y_valid(yv[i]),       .y_dist(yd[i]),       .y_addr(ya[i])
        );
      end else begin : g_next
        dist_comp_sel #(.DW(DW), .AW(TW)) u_node (
          .a_valid(g_round[l-1].yv[2*i]),   .a_dist(g_round[l-1].yd[2*i]),
          .a_addr (g_round[l-1].ya[2*i]),
          .b_valid(g_round[l-1].yv[2*i+1]), .b_dist(g_round[l-1].yd[2*i+1]),
          .b_addr (g_round[l-1].ya[2*i+1]),
          .y_valid(yv[i]),                  .y_dist(yd[i]),
          .y_addr (ya[i])
        );
      end
    end
  end

  logic          fin_v;
  logic [DW-1:0] fin_d;
  logic [TW-1:0] fin_a;
  assign fin_v = g_round[LV].yv[0];
  assign fin_d = g_round[LV].yd[0];
  assign fin_a = g_round[LV].ya[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      g_found   <= 1'b0;
      g_bank    <= '0;
      g_addr    <= '0;
      g_dist    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        g_found <= fin_v;
        {g_bank, g_addr} <= fin_a;
        g_dist  <= fin_d;
      end
    end
  end

endmodule

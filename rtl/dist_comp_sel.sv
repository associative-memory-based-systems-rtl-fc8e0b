// dist_comp_sel: one node of the global winner tournament.
//
// A distance comparator (Dist_Comp) decides which of two candidates is
// closer to the input, and a 2-1 selector passes that candidate's distance
// and address on to the next round.  An invalid candidate (a disabled bank,
// or a bank without a winner) always loses; on equal distances input a
// wins, so lower-numbered banks have priority.  Combinational.
module dist_comp_sel #(
  parameter int unsigned DW = 9,
  parameter int unsigned AW = 8
) (
  input  logic          a_valid,
  input  logic [DW-1:0] a_dist,
  input  logic [AW-1:0] a_addr,
  input  logic          b_valid,
  input  logic [DW-1:0] b_dist,
  input  logic [AW-1:0] b_addr,
  output logic          y_valid,
  output logic [DW-1:0] y_dist,
  output logic [AW-1:0] y_addr
);

  logic take_b;

  // Dist_Comp
  always_comb take_b = b_valid && (!a_valid || (b_dist < a_dist));

  // 2-1 Sel
  always_comb begin
    y_valid = a_valid | b_valid;
    y_dist  = take_b ? b_dist : a_dist;
    y_addr  = take_b ? b_addr : a_addr;
  end

endmodule

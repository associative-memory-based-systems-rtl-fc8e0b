// tree_adder: digital distance calculation of the local winner.
//
// Adds N operands of IW bits in a balanced binary tree of adders, one level
// per doubling, so the depth is log2(N) adders.  In the bank the operands
// are the unit-comparator outputs (mag + cor) of the winner row, and the
// sum is the winner-input distance.  N need not be a power of two; missing
// leaves are zero.  Combinational.
module tree_adder #(
  parameter int unsigned N  = 16,
  parameter int unsigned IW = 6,
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned OW = IW + LV
) (
  input  logic [N*IW-1:0] in_vals,
  output logic [OW-1:0]   sum
);

  localparam int unsigned NP = 1 << LV;

  logic [OW-1:0] node [LV+1][NP];

  always_comb begin
    for (int i = 0; i < NP; i++)
      node[0][i] = (i < N) ? OW'(in_vals[i*IW +: IW]) : '0;
    for (int l = 1; l <= LV; l++)
      for (int i = 0; i < NP; i++)
        node[l][i] = (i < (NP >> l)) ? node[l-1][2*i] + node[l-1][2*i+1] : '0;
    sum = node[LV][0];
  end

endmodule

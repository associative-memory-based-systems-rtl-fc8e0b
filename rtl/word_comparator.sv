// word_comparator: the distance C_i of one row.
//
// On chip the unit outputs switch match-line transistors whose widths are
// weighted 2^(b-1) for OUT_b and 1 for the correction line OUT_k+1, so the
// current sunk from the match line is proportional to the row's Manhattan
// (or, with K = 1, Hamming) distance.  Here that summation is exact integer
// arithmetic: C_i = sum over units of (mag + cor).  HAS_COR = 0 drops the
// correction inputs, as the Hamming field has no such line.  Combinational.
module word_comparator #(
  parameter int unsigned W       = 16,
  parameter int unsigned K       = 5,
  parameter bit          HAS_COR = 1'b1,
  localparam int unsigned DW     = am_pkg::dist_width(W, K)
) (
  input  logic [W*K-1:0] mag,     // OUT_1..OUT_k of every unit
  input  logic [W-1:0]   cor,     // OUT_k+1 of every unit
  output logic [DW-1:0]  c_dist   // C_i as a distance
);

  always_comb begin
    c_dist = '0;
    for (int j = 0; j < W; j++) begin
      c_dist = c_dist + DW'(mag[j*K +: K]);
      if (HAS_COR) c_dist = c_dist + DW'(cor[j]);
    end
  end

endmodule

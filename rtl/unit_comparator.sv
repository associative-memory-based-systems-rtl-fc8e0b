// unit_comparator: |SW - REF| of one K-bit unit, in the form the word
// comparator consumes.
//
// The unit adds the search value to the inverted stored value with a ripple
// carry (carry-in 0), which gives SW - REF - 1 modulo 2^K.  The carry out
// of the top stage (C_max) is 1 exactly when SW > REF.  In that case the
// sum bits are one short of the magnitude, and the extra output out_cor
// (weight 1) makes up the difference; otherwise the sum bits are inverted,
// which yields REF - SW.  So |SW - REF| = out_mag + out_cor, with no second
// adder.  This is the structure of the document's compact subtractor /
// absolute-value circuit (XOR with the inverted stored bit, carry chain,
// conditional inversion, and a unit-weight OUT_k+1 line).  Purely
// combinational.
module unit_comparator #(
  parameter int unsigned K = 5
) (
  input  logic [K-1:0] sw,        // search-word unit (SW)
  input  logic [K-1:0] ref_bits,  // stored unit (REF)
  output logic [K-1:0] out_mag,   // OUT_1..OUT_k, binary weights
  output logic         out_cor    // OUT_k+1, weight 1 (equals C_max)
);

  logic [K:0]   carry;
  logic [K-1:0] sum;
  logic [K-1:0] p;                // SW xor ~REF per bit

  assign carry[0] = 1'b0;

  for (genvar b = 0; b < K; b++) begin : g_bit
    assign p[b]       = sw[b] ^ ~ref_bits[b];
    assign sum[b]     = p[b] ^ carry[b];
    assign carry[b+1] = (sw[b] & ~ref_bits[b]) | (p[b] & carry[b]);
  end

  assign out_cor = carry[K];                 // C_max
  assign out_mag = sum ^ {K{~carry[K]}};     // invert when SW <= REF

endmodule

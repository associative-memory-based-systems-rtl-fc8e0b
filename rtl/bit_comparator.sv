// bit_comparator: bit comparators of one row of the Hamming memory field.
//
// Each stored bit is compared with the search-word bit on its column; a
// mismatch drives a "1" that switches on the row's match-line transistor.
// The row's Hamming distance is then the count of ones, formed by the word
// comparator.  Combinational.
module bit_comparator #(
  parameter int unsigned W = 768
) (
  input  logic [W-1:0] sw,        // search word
  input  logic [W-1:0] ref_bits,  // stored row
  output logic [W-1:0] mismatch   // 1 where the bits differ
);

  always_comb mismatch = sw ^ ref_bits;

endmodule

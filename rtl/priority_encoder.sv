// priority_encoder: the bank's winner address from the WTA match signals.
//
// Returns the lowest-numbered row whose match signal is 1 and flags whether
// any is.  Lowest-first priority is this design's choice.  Combinational.
module priority_encoder #(
  parameter int unsigned R  = 64,
  localparam int unsigned AW = (R > 1) ? $clog2(R) : 1
) (
  input  logic [R-1:0]  m,
  output logic          found,
  output logic [AW-1:0] addr
);

  always_comb begin
    found = 1'b0;
    addr  = '0;
    for (int i = R - 1; i >= 0; i--)
      if (m[i]) begin
        found = 1'b1;
        addr  = AW'(i);
      end
  end

endmodule

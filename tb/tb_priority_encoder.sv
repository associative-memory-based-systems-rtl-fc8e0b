// tb_priority_encoder: single and multiple match lines; the address must be
// the lowest set row and found must flag any set row.
module tb_priority_encoder;
  localparam int unsigned R = 64;
  logic [R-1:0] m;
  logic         found;
  logic [5:0]   addr;
  int checks = 0, failures = 0;

  priority_encoder #(.R(R)) dut (.m, .found, .addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int lo;
      if (t < R) m = R'(1) << t;
      else if (t == R) m = '0;
      else begin
        m = '0;
        for (int k = 0; k < 3; k++) m[$urandom % R] = 1'b1;
      end
      #1;
      lo = -1;
      for (int i = R - 1; i >= 0; i--) if (m[i]) lo = i;
      checks++;
      if (found != (lo >= 0) || (lo >= 0 && int'(addr) != lo)) begin
        failures++;
        $display("FAIL m=%h found=%0d addr=%0d exp=%0d", m, found, addr, lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

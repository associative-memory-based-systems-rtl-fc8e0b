// tb_unit_comparator: exhaustive check of the K-bit subtract/absolute-value
// unit.  For every pair (SW, REF) the sum out_mag + out_cor must equal
// |SW - REF|, and out_cor must be 1 exactly when SW > REF.
module tb_unit_comparator;
  localparam int unsigned K = 5;
  logic [K-1:0] sw, rf, mag;
  logic         cor;
  int checks = 0, failures = 0;

  unit_comparator #(.K(K)) dut (.sw, .ref_bits(rf), .out_mag(mag), .out_cor(cor));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << K); a++)
      for (int b = 0; b < (1 << K); b++) begin
        int exp_d;
        sw = K'(a); rf = K'(b);
        #1;
        exp_d = (a > b) ? a - b : b - a;
        checks++;
        if (int'(mag) + int'(cor) != exp_d || cor != (a > b)) begin
          failures++;
          $display("FAIL sw=%0d ref=%0d mag=%0d cor=%0d", a, b, mag, cor);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

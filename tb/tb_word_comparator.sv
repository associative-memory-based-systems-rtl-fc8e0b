// tb_word_comparator: random unit outputs; C_i must equal the weighted sum
// of OUT_1..OUT_k (binary weights) plus OUT_k+1 (weight 1) over all units.
// Also checks the Hamming form (K = 1, no correction line).
module tb_word_comparator;
  localparam int unsigned W = 16, K = 5, DW = am_pkg::dist_width(W, K);
  localparam int unsigned HW = 768, HDW = am_pkg::dist_width(HW, 1);
  logic [W*K-1:0] mag;
  logic [W-1:0]   cor;
  logic [DW-1:0]  c;
  logic [HW-1:0]  hmag;
  logic [HDW-1:0] hc;
  int checks = 0, failures = 0;

  word_comparator #(.W(W), .K(K), .HAS_COR(1'b1)) dut (.mag, .cor, .c_dist(c));
  word_comparator #(.W(HW), .K(1), .HAS_COR(1'b0)) dut_h (.mag(hmag), .cor('0), .c_dist(hc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int e, he;
      e = 0; he = 0;
      for (int j = 0; j < W; j++) begin
        int v;
        v = $urandom % (1 << K);
        mag[j*K +: K] = K'(v);
        // the correction line is only on when mag < 2^K - 1
        cor[j] = (v < (1 << K) - 1) ? 1'($urandom) : 1'b0;
        if (t == 0) begin mag[j*K +: K] = '1; cor[j] = 1'b0; end
        e += int'(mag[j*K +: K]) + int'(cor[j]);
      end
      for (int i = 0; i < HW; i++) begin
        hmag[i] = (($urandom % 4) == 0);
        if (t == 1) hmag[i] = 1'b1;
        he += int'(hmag[i]);
      end
      #1;
      checks += 2;
      if (int'(c) != e)   begin failures++; $display("FAIL man %0d vs %0d", c, e); end
      if (int'(hc) != he) begin failures++; $display("FAIL ham %0d vs %0d", hc, he); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

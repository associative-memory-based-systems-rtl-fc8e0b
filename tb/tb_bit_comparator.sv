// tb_bit_comparator: random words; the mismatch vector must be one exactly
// at the differing positions, and its count must equal a bit-by-bit count.
module tb_bit_comparator;
  localparam int unsigned W = 768;
  logic [W-1:0] sw, rf, mm;
  int checks = 0, failures = 0;

  bit_comparator #(.W(W)) dut (.sw, .ref_bits(rf), .mismatch(mm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      int cnt, exp_cnt;
      for (int i = 0; i < W; i++) begin
        sw[i] = 1'($urandom);
        rf[i] = (($urandom % 8) < t % 8) ? ~sw[i] : sw[i];
      end
      #1;
      cnt = 0; exp_cnt = 0;
      for (int i = 0; i < W; i++) begin
        if (mm[i]) cnt++;
        if (sw[i] != rf[i]) exp_cnt++;
        if (mm[i] != (sw[i] != rf[i])) begin
          checks++; failures++;
        end
      end
      checks++;
      if (cnt != exp_cnt) begin
        failures++;
        $display("FAIL count %0d vs %0d", cnt, exp_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

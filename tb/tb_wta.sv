// tb_wta: random WLA outputs; M_i must be 1 exactly for the row(s) at the
// highest level, down to a difference of one step.
module tb_wta;
  localparam int unsigned R = 64, LAW = 12;
  logic [R*LAW-1:0] la;
  logic [R-1:0]     m;
  int checks = 0, failures = 0;

  wta #(.R(R), .LAW(LAW), .STAGES(5), .GAIN(5)) dut (.la, .m);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int mx, w;
      mx = 0;
      w = $urandom % R;
      for (int i = 0; i < R; i++) begin
        int v;
        case (t % 3)
          0: v = $urandom % (1 << LAW);
          1: v = 4095 - 20 * ($urandom % 10);          // lined up by the WLA
          default: v = (i == w) ? 3000 : 2999 - ($urandom % 3);  // 1-step gap
        endcase
        la[i*LAW +: LAW] = LAW'(v);
        if (v > mx) mx = v;
      end
      #1;
      for (int i = 0; i < R; i++) begin
        checks++;
        if (m[i] != (int'(la[i*LAW +: LAW]) == mx)) begin
          failures++;
          $display("FAIL t=%0d row %0d la=%0d max=%0d m=%0d", t, i, la[i*LAW +: LAW], mx, m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

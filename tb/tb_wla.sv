// tb_wla: the feedback must equal the smallest C_i; the winner row(s) must
// sit at full scale whatever the absolute winner distance; a loser d steps
// away must read full scale - 20*d (or 0 when that is negative); shifting
// every C_i by the same amount must not change LA (self-adaptation); en low
// must give all zeros.
module tb_wla;
  localparam int unsigned R = 64, DW = 9, LAW = 12, GAIN = 20;
  localparam int LA_MAX = (1 << LAW) - 1;
  logic              en;
  logic [R*DW-1:0]   c;
  logic [R*LAW-1:0]  la, la_prev;
  logic [DW-1:0]     fb;
  int checks = 0, failures = 0;

  wla #(.R(R), .DW(DW), .GAIN(GAIN), .LAW(LAW)) dut (.en, .c_dist(c), .la, .fb);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int mn, base;
      base = (t < 100) ? 0 : 200;   // second half: same patterns, shifted
      if (t >= 100) void'($urandom(t - 100 + 7)); else void'($urandom(t + 7));
      mn = 1 << DW;
      for (int i = 0; i < R; i++) begin
        int v;
        v = base + ($urandom % 250);
        c[i*DW +: DW] = DW'(v);
        if (v < mn) mn = v;
      end
      #1;
      checks++;
      if (int'(fb) != mn) begin failures++; $display("FAIL fb %0d vs %0d", fb, mn); end
      for (int i = 0; i < R; i++) begin
        int d, e;
        d = int'(c[i*DW +: DW]) - mn;
        e = (GAIN * d >= LA_MAX) ? 0 : LA_MAX - GAIN * d;
        checks++;
        if (int'(la[i*LAW +: LAW]) != e) begin
          failures++;
          $display("FAIL row %0d d=%0d la=%0d exp=%0d", i, d, la[i*LAW +: LAW], e);
        end
      end
    end
    en = 1'b0;
    #1;
    checks++;
    if (la != '0) begin failures++; $display("FAIL en=0 la not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

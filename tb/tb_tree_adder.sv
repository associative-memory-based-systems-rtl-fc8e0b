// tb_tree_adder: random operands, including all-maximum; the tree sum must
// equal a plain sum.  A non-power-of-two size is checked too.
module tb_tree_adder;
  localparam int unsigned N = 16, IW = 6, OW = IW + 4;
  localparam int unsigned N2 = 11, OW2 = IW + 4;
  logic [N*IW-1:0]  a;
  logic [OW-1:0]    s;
  logic [N2*IW-1:0] a2;
  logic [OW2-1:0]   s2;
  int checks = 0, failures = 0;

  tree_adder #(.N(N), .IW(IW)) dut (.in_vals(a), .sum(s));
  tree_adder #(.N(N2), .IW(IW)) dut2 (.in_vals(a2), .sum(s2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int e, e2;
      e = 0; e2 = 0;
      for (int i = 0; i < N; i++) begin
        a[i*IW +: IW] = (t == 0) ? '1 : IW'($urandom);
        e += int'(a[i*IW +: IW]);
      end
      for (int i = 0; i < N2; i++) begin
        a2[i*IW +: IW] = IW'($urandom);
        e2 += int'(a2[i*IW +: IW]);
      end
      #1;
      checks += 2;
      if (int'(s) != e)   begin failures++; $display("FAIL %0d vs %0d", s, e); end
      if (int'(s2) != e2) begin failures++; $display("FAIL2 %0d vs %0d", s2, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

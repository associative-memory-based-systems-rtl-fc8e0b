// tb_dist_comp_sel: the node must pass the valid candidate with the smaller
// distance, prefer input a on a tie, and report valid if either input is.
module tb_dist_comp_sel;
  localparam int unsigned DW = 9, AW = 8;
  logic          av, bv, yv;
  logic [DW-1:0] ad, bd, yd;
  logic [AW-1:0] aa, ba, ya;
  int checks = 0, failures = 0;

  dist_comp_sel #(.DW(DW), .AW(AW)) dut (
    .a_valid(av), .a_dist(ad), .a_addr(aa), .b_valid(bv), .b_dist(bd), .b_addr(ba),
    .y_valid(yv), .y_dist(yd), .y_addr(ya));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic pick_b;
      av = ($urandom % 4) != 0; bv = ($urandom % 4) != 0;
      ad = DW'($urandom % 40); bd = (t % 5 == 0) ? ad : DW'($urandom % 40);
      aa = AW'($urandom); ba = AW'($urandom);
      #1;
      pick_b = bv && (!av || int'(bd) < int'(ad));
      checks++;
      if (yv != (av || bv) ||
          (av || bv) && (yd != (pick_b ? bd : ad) || ya != (pick_b ? ba : aa))) begin
        failures++;
        $display("FAIL av=%0d ad=%0d bv=%0d bd=%0d -> %0d %0d", av, ad, bv, bd, yd, ya);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

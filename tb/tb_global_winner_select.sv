// tb_global_winner_select: random local winners of 4 banks (some absent,
// some tied); one cycle after in_valid the output must name the bank and
// row of the smallest distance, lowest bank on ties.  Also checks an
// 8-bank tree.
module tb_global_winner_select;
  localparam int unsigned DW = 9, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid;
  logic [7:0]       found;
  logic [8*DW-1:0]  ldist;
  logic [8*AW-1:0]  addr;
  logic             ov4, gf4, ov8, gf8;
  logic [1:0]       gb4;
  logic [2:0]       gb8;
  logic [AW-1:0]    ga4, ga8;
  logic [DW-1:0]    gd4, gd8;
  int checks = 0, failures = 0;

  global_winner_select #(.NB(4), .DW(DW), .AW(AW)) dut4 (
    .clk, .rst_n, .in_valid, .loc_found(found[3:0]), .loc_dist(ldist[4*DW-1:0]),
    .loc_addr(addr[4*AW-1:0]), .out_valid(ov4), .g_found(gf4), .g_bank(gb4), .g_addr(ga4), .g_dist(gd4));
  global_winner_select #(.NB(8), .DW(DW), .AW(AW)) dut8 (
    .clk, .rst_n, .in_valid, .loc_found(found), .loc_dist(ldist),
    .loc_addr(addr), .out_valid(ov8), .g_found(gf8), .g_bank(gb8), .g_addr(ga8), .g_dist(gd8));

  function automatic int best(int n);
    int b = -1;
    for (int i = 0; i < n; i++)
      if (found[i] && (b < 0 || ldist[i*DW +: DW] < ldist[b*DW +: DW])) b = i;
    return b;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; found = '0; ldist = '0; addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int b4, b8;
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 8; i++) begin
        found[i] = ($urandom % 5) != 0;
        ldist[i*DW +: DW] = DW'($urandom % 12);
        addr[i*AW +: AW] = AW'($urandom);
      end
      if (t == 0) found = '0;
      b4 = best(4); b8 = best(8);
      @(posedge clk); #1;
      checks += 3;
      if (!ov4 || !ov8) begin failures++; $display("FAIL valid latency"); end
      if (gf4 != (b4 >= 0) || (b4 >= 0 && (int'(gb4) != b4 || ga4 != addr[b4*AW +: AW] || gd4 != ldist[b4*DW +: DW]))) begin
        failures++; $display("FAIL nb4 t=%0d exp bank %0d got %0d", t, b4, gb4);
      end
      if (gf8 != (b8 >= 0) || (b8 >= 0 && (int'(gb8) != b8 || ga8 != addr[b8*AW +: AW] || gd8 != ldist[b8*DW +: DW]))) begin
        failures++; $display("FAIL nb8 t=%0d exp bank %0d got %0d", t, b8, gb8);
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (ov4) begin failures++; $display("FAIL out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

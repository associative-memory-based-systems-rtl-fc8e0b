// tb_storage_field: writes random words, reads them back with one cycle of
// latency, and checks that the parallel "cells" view matches a model.
module tb_storage_field;
  localparam int unsigned R = 64, W = 16, K = 5, WB = W * K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          wr_en, rd_en;
  logic [5:0]    wa, ra;
  logic [WB-1:0] wd, rd;
  logic [R*WB-1:0] cells;
  logic [WB-1:0] model [R];
  int checks = 0, failures = 0;

  storage_field #(.R(R), .W(W), .K(K)) dut (
    .clk, .rst_n, .wr_en, .wr_addr(wa), .wdata(wd), .rd_en, .rd_addr(ra), .rdata(rd), .cells);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wa = '0; ra = '0; wd = '0;
    for (int i = 0; i < R; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      logic [WB-1:0] exp_rd;
      logic          do_rd;
      @(negedge clk);
      wr_en = ($urandom % 2) == 0;
      wa = 6'($urandom);
      for (int b = 0; b < WB; b += 16) wd[b +: 16] = 16'($urandom);
      do_rd = ($urandom % 2) == 0;
      rd_en = do_rd;
      ra = 6'($urandom);
      exp_rd = model[ra];
      @(posedge clk);
      if (wr_en) model[wa] = wd;
      #1;
      if (do_rd) begin
        checks++;
        if (rd != exp_rd) begin failures++; $display("FAIL read row %0d", ra); end
      end
      checks++;
      for (int i = 0; i < R; i++)
        if (cells[i*WB +: WB] != model[i]) begin
          failures++; $display("FAIL cells row %0d", i); break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vq_codebook: codebook-based image compression by vector quantization.
// A 1024-entry codebook of 4x4 pixel blocks with 5-bit grey values is held
// in an 8-bank x 128-word bank-type memory.  A synthetic 64x64 image (smooth
// gradients plus noise) is cut into 4x4 blocks; each block is searched, one
// per cycle, and the returned code number {bank,row} must be the nearest
// codebook entry in Manhattan distance (ties: lowest code number), with the
// right distance, two cycles after the search.  Also reports the average
// winner-input distance of the image.
module tb_vq_codebook;
  localparam int unsigned NB = 8, R = 128, W = 16, K = 5, WB = W * K;
  localparam int unsigned CB = NB * R, IMG = 64, NBLK = (IMG / 4) * (IMG / 4);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NB-1:0] bank_en;
  logic          wr_en, rd_en, rd_winner, rdata_valid, search;
  logic [9:0]    addr;
  logic [WB-1:0] wdata, rdata, sword;
  logic          wv, wf;
  logic [2:0]    wb;
  logic [6:0]    wr;
  logic [8:0]    wd;
  logic [WB-1:0] cb [CB];
  int checks = 0, failures = 0;
  longint dsum = 0;

  bank_am_system #(.NB(NB), .R(R), .W(W), .K(K)) dut (
    .clk, .rst_n, .bank_en, .wr_en, .addr, .wdata, .rd_en, .rd_winner, .rdata,
    .rdata_valid, .search, .search_word(sword), .win_valid(wv), .win_found(wf),
    .win_bank(wb), .win_row(wr), .win_dist(wd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mdist(logic [WB-1:0] a, logic [WB-1:0] b);
    int d = 0;
    for (int j = 0; j < W; j++) begin
      int x = int'(a[j*K +: K]), y = int'(b[j*K +: K]);
      d += (x > y) ? x - y : y - x;
    end
    return d;
  endfunction

  function automatic int pixel(int x, int y);
    int v = (x / 2 + y / 3 + ((x * y) % 7)) % 32;
    v += int'($urandom % 3) - 1;
    return (v < 0) ? 0 : (v > 31 ? 31 : v);
  endfunction

  int exp_code [$];
  int exp_dist [$];
  logic s1;
  always @(posedge clk) begin
    automatic logic was2 = s1;
    s1 <= search;
    if (rst_n && was2) begin
      int e, ed;
      #1;
      e = exp_code.pop_front(); ed = exp_dist.pop_front();
      checks++;
      dsum += ed;
      if (!wv || !wf || int'({wb, wr}) != e || int'(wd) != ed) begin
        failures++;
        $display("FAIL code %0d dist %0d, expected %0d dist %0d", {wb, wr}, wd, e, ed);
      end
    end
  end

  initial begin
    bank_en = '1; wr_en = 0; rd_en = 0; rd_winner = 0; search = 0; addr = '0;
    wdata = '0; sword = '0; s1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // codebook: blocks with a base level and a gradient in x and y
    for (int c = 0; c < CB; c++) begin
      automatic int base = c % 32, gx = (c / 32) % 4, gy = (c / 128) % 4, sh = c / 512;
      @(negedge clk);
      for (int j = 0; j < W; j++) begin
        automatic int v = base + gx * (j % 4) - gy * (j / 4) + (sh ? ((j % 2) ? 1 : -1) : 0);
        wdata[j*K +: K] = K'((v < 0) ? 0 : (v > 31 ? 31 : v));
      end
      wr_en = 1; addr = 10'(c); cb[c] = wdata;
    end
    @(negedge clk); wr_en = 0;
    // image blocks, one search per cycle
    for (int b = 0; b < NBLK; b++) begin
      logic [WB-1:0] blk;
      automatic int best = 0, bd = 1 << 20;
      for (int j = 0; j < W; j++)
        blk[j*K +: K] = K'(pixel((b % (IMG / 4)) * 4 + j % 4, (b / (IMG / 4)) * 4 + j / 4));
      for (int c = 0; c < CB; c++)
        if (mdist(blk, cb[c]) < bd) begin bd = mdist(blk, cb[c]); best = c; end
      exp_code.push_back(best); exp_dist.push_back(bd);
      sword = blk; search = 1;
      @(negedge clk);
    end
    search = 0;
    repeat (3) @(negedge clk);
    $display("blocks=%0d average winner-input distance=%0d/100", NBLK, int'(dsum * 100 / NBLK));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hamming_am: the 32 x 768-bit Hamming memory at its default size.
// Loads random reference words (row 9 duplicated in row 22 to force a
// tie), then searches with random words, words a few bits from a stored
// row, and exact copies.  One cycle after each search the match lines must
// be set for exactly the rows at minimum Hamming distance, computed by a
// reference model.  Also checks read-back and the disabled state.
module tb_hamming_am;
  localparam int unsigned R = 32, W = 768;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         en, wr_en, rd_en, search, mv;
  logic [4:0]   addr;
  logic [W-1:0] wdata, rdata, sword;
  logic [R-1:0] match;
  logic [W-1:0] model [R];
  int checks = 0, failures = 0, n_tie = 0;

  hamming_am #(.R(R), .W(W)) dut (
    .clk, .rst_n, .en, .wr_en, .addr, .wdata, .rd_en, .rdata, .search,
    .search_word(sword), .match_valid(mv), .match);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int b = 0; b < W; b += 32) v[b +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [R-1:0] expected(logic [W-1:0] w);
    int mn = W + 1;
    logic [R-1:0] e = '0;
    for (int i = 0; i < R; i++) if ($countones(w ^ model[i]) < mn) mn = $countones(w ^ model[i]);
    for (int i = 0; i < R; i++) e[i] = ($countones(w ^ model[i]) == mn);
    return e;
  endfunction

  initial begin
    en = 1; wr_en = 0; rd_en = 0; search = 0; addr = '0; wdata = '0; sword = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < R; i++) begin
      @(negedge clk);
      wr_en = 1; addr = 5'(i); wdata = (i == 22) ? model[9] : rand_word(); model[i] = wdata;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 120; t++) begin
      logic [W-1:0] w;
      logic [R-1:0] e;
      case (t % 4)
        0: w = rand_word();
        1: begin
             w = model[$urandom % R];
             for (int k = 0; k < 1 + t % 50; k++) w[$urandom % W] ^= 1'b1;
           end
        2: w = model[$urandom % R];
        default: w = model[9];
      endcase
      e = expected(w);
      if ($countones(e) > 1) n_tie++;
      sword = w; search = 1;
      @(posedge clk); #1;
      checks++;
      if (!mv || match != e) begin
        failures++; $display("FAIL t=%0d match %h exp %h", t, match, e);
      end
      @(negedge clk); search = 0;
    end
    // read back
    rd_en = 1; addr = 5'd13;
    @(posedge clk); #1;
    checks++;
    if (rdata != model[13]) begin failures++; $display("FAIL read-back"); end
    @(negedge clk); rd_en = 0;
    // disabled
    en = 0; sword = model[4]; search = 1;
    @(posedge clk); #1;
    checks++;
    if (match != '0) begin failures++; $display("FAIL disabled memory matched"); end
    checks++;
    if (n_tie == 0) begin failures++; $display("FAIL no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bank_am_system: the 4-bank, 256-word Manhattan memory at its default
// size.  Loads random reference words into all banks, then issues one
// search per cycle while changing the bank enables.  A reference model
// computes the global nearest word among the enabled banks (lowest bank,
// then lowest row, on equal distance); two cycles after each search the
// memory must report that bank, row and distance.  Also reads the winner
// word back and checks a search with every bank disabled.  Counts the
// cases exercised: cross-bank ties, searches with some banks disabled, all
// banks disabled, winners in every bank.
module tb_bank_am_system;
  localparam int unsigned NB = 4, R = 64, W = 16, K = 5, WB = W * K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NB-1:0] bank_en;
  logic          wr_en, rd_en, rd_winner, rdata_valid, search;
  logic [7:0]    addr;
  logic [WB-1:0] wdata, rdata, sword;
  logic          wv, wf;
  logic [1:0]    wb;
  logic [5:0]    wr;
  logic [8:0]    wd;
  logic [WB-1:0] model [NB*R];
  int checks = 0, failures = 0;
  int n_tie = 0, n_partial = 0, n_none = 0;
  int n_bank [NB];

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

  function automatic logic [WB-1:0] rand_word();
    logic [WB-1:0] v;
    for (int j = 0; j < W; j++) v[j*K +: K] = K'($urandom);
    return v;
  endfunction

  // expected results, indexed by issue number, checked 2 cycles later
  int exp_idx [$];
  int exp_dist [$];
  logic [WB-1:0] last_win_word;

  task automatic issue(input logic [WB-1:0] w, input logic [NB-1:0] en_mask);
    int best = -1, bd = 1 << 20, nmin = 0;
    for (int g = 0; g < NB * R; g++)
      if (en_mask[g / R]) begin
        int d = mdist(w, model[g]);
        if (d < bd) begin bd = d; best = g; end
      end
    for (int g = 0; g < NB * R; g++)
      if (en_mask[g / R] && mdist(w, model[g]) == bd && (g / R) != (best / R)) nmin++;
    if (nmin > 0) n_tie++;
    if (en_mask == '0) n_none++;
    else if (en_mask != '1) n_partial++;
    if (best >= 0) n_bank[best / R]++;
    exp_idx.push_back(best);
    exp_dist.push_back(bd);
    bank_en = en_mask;
    sword = w;
    search = 1'b1;
  endtask

  // pipeline checker: a search sampled at edge t is answered at edge t+2
  logic s1, s2;
  always @(posedge clk) begin
    automatic logic was2 = s1;
    s2 <= s1;
    s1 <= search;
    if (rst_n && was2) begin
      int e, ed;
      #1;
      e = exp_idx.pop_front();
      ed = exp_dist.pop_front();
      checks++;
      if (!wv) begin failures++; $display("FAIL win_valid not 2 cycles after search"); end
      else if (e < 0) begin
        if (wf) begin failures++; $display("FAIL winner with all banks disabled"); end
      end else if (!wf || int'(wb) != e / R || int'(wr) != e % R || int'(wd) != ed) begin
        failures++;
        $display("FAIL got bank %0d row %0d dist %0d, exp bank %0d row %0d dist %0d",
                 wb, wr, wd, e / R, e % R, ed);
      end else last_win_word = model[e];
    end
  end

  initial begin
    bank_en = '1; wr_en = 0; rd_en = 0; rd_winner = 0; search = 0; addr = '0;
    wdata = '0; sword = '0; s1 = 0; s2 = 0;
    foreach (n_bank[i]) n_bank[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < NB * R; g++) begin
      @(negedge clk);
      wr_en = 1; addr = 8'(g); wdata = rand_word();
      // rows 5 of banks 1 and 3 hold the same word as row 5 of bank 0
      if (g == R + 5 || g == 3 * R + 5) wdata = model[5];
      model[g] = wdata;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 400; t++) begin
      logic [WB-1:0] w;
      logic [NB-1:0] m;
      case (t % 4)
        0: w = rand_word();
        1: begin
             w = model[$urandom % (NB * R)];
             for (int k = 0; k < 4; k++) begin
               automatic int j = $urandom % W;
               w[j*K +: K] = w[j*K +: K] ^ K'(1 << ($urandom % 3));
             end
           end
        2: w = model[$urandom % (NB * R)];
        default: w = model[5];
      endcase
      m = (t % 5 == 0) ? NB'($urandom) : '1;
      issue(w, m);
      @(negedge clk);
    end
    // last search: an exact hit in bank 2, all banks on
    issue(model[2 * R + 17], '1);
    @(negedge clk);
    search = 0;
    repeat (3) @(negedge clk);
    // read the global winner's word
    rd_en = 1; rd_winner = 1;
    @(negedge clk);
    rd_en = 0; rd_winner = 0;
    checks++;
    if (!rdata_valid || rdata != model[2 * R + 17]) begin
      failures++; $display("FAIL winner read-out");
    end
    // plain read of an address
    rd_en = 1; addr = 8'(3 * R + 9);
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rdata != model[3 * R + 9]) begin failures++; $display("FAIL address read"); end
    // an all-disabled search for certain
    issue(model[0], '0);
    @(negedge clk);
    search = 0;
    repeat (3) @(negedge clk);
    $display("ties=%0d partial=%0d none=%0d wins/bank=%0d %0d %0d %0d",
             n_tie, n_partial, n_none, n_bank[0], n_bank[1], n_bank[2], n_bank[3]);
    checks++;
    if (n_tie == 0 || n_partial == 0 || n_none == 0) begin
      failures++; $display("FAIL a mechanism was not exercised");
    end
    foreach (n_bank[i]) begin
      checks++;
      if (n_bank[i] == 0) begin failures++; $display("FAIL bank %0d never won", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

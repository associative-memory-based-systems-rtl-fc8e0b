// tb_am_top: end-to-end test of the top level at its default sizes.
// Loads 256 reference words into the bank-type Manhattan memory and 32
// words into the Hamming memory, then searches both at once, one search per
// cycle, against reference models.  Manhattan results are expected two
// cycles after the search, Hamming match lines one cycle after.  Counts how
// often each mechanism occurred and fails if any never did: back-to-back
// pipelined searches, bank-selective activation (some / all banks off),
// equal-distance ties across banks, winner read-out through the 2-1 address
// selector, ties on the Hamming match lines, and a disabled Hamming memory.
module tb_am_top;
  localparam int unsigned NB = 4, R = 64, W = 16, K = 5, WB = W * K;
  localparam int unsigned HR = 32, HW = 768;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NB-1:0] m_bank_en;
  logic          m_wr_en, m_rd_en, m_rd_winner, m_rdata_valid, m_search;
  logic [7:0]    m_addr;
  logic [WB-1:0] m_wdata, m_rdata, m_sword;
  logic          m_wv, m_wf;
  logic [1:0]    m_wb;
  logic [5:0]    m_wr;
  logic [8:0]    m_wd;
  logic          h_en, h_wr_en, h_rd_en, h_search, h_mv;
  logic [4:0]    h_addr;
  logic [HW-1:0] h_wdata, h_rdata, h_sword;
  logic [HR-1:0] h_match;

  am_top dut (
    .clk, .rst_n,
    .m_bank_en, .m_wr_en, .m_addr, .m_wdata, .m_rd_en, .m_rd_winner, .m_rdata,
    .m_rdata_valid, .m_search, .m_search_word(m_sword), .m_win_valid(m_wv),
    .m_win_found(m_wf), .m_win_bank(m_wb), .m_win_row(m_wr), .m_win_dist(m_wd),
    .h_en, .h_wr_en, .h_addr, .h_wdata, .h_rd_en, .h_rdata, .h_search,
    .h_search_word(h_sword), .h_match_valid(h_mv), .h_match);

  logic [WB-1:0] mm [NB*R];
  logic [HW-1:0] hm [HR];
  int checks = 0, failures = 0;
  int n_b2b = 0, n_partial = 0, n_none = 0, n_xtie = 0, n_readout = 0, n_htie = 0, n_hoff = 0;

  initial begin
    repeat (30000) @(posedge clk);
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

  function automatic logic [WB-1:0] rand_mword();
    logic [WB-1:0] v;
    for (int j = 0; j < W; j++) v[j*K +: K] = K'($urandom);
    return v;
  endfunction

  function automatic logic [HW-1:0] rand_hword();
    logic [HW-1:0] v;
    for (int b = 0; b < HW; b += 32) v[b +: 32] = $urandom;
    return v;
  endfunction

  // ---- Manhattan expectations (2-cycle pipeline) ----
  int m_exp [$];
  int m_expd [$];
  logic ms1;
  logic prev_search;

  task automatic m_issue(input logic [WB-1:0] w, input logic [NB-1:0] en_mask);
    int best = -1, bd = 1 << 20, other = 0;
    for (int g = 0; g < NB * R; g++)
      if (en_mask[g / R] && mdist(w, mm[g]) < bd) begin bd = mdist(w, mm[g]); best = g; end
    for (int g = 0; g < NB * R; g++)
      if (en_mask[g / R] && mdist(w, mm[g]) == bd && g / R != best / R) other++;
    if (other > 0) n_xtie++;
    if (en_mask == '0) n_none++; else if (en_mask != '1) n_partial++;
    if (prev_search) n_b2b++;
    m_exp.push_back(best);
    m_expd.push_back(bd);
    m_bank_en = en_mask; m_sword = w; m_search = 1'b1;
  endtask

  always @(posedge clk) begin
    automatic logic was2 = ms1;
    ms1 <= m_search;
    prev_search <= m_search;
    if (rst_n && was2) begin
      int e, ed;
      #1;
      e = m_exp.pop_front(); ed = m_expd.pop_front();
      checks++;
      if (!m_wv) begin failures++; $display("FAIL m latency"); end
      else if (e < 0) begin
        if (m_wf) begin failures++; $display("FAIL m winner with banks off"); end
      end else if (!m_wf || int'(m_wb) != e / R || int'(m_wr) != e % R || int'(m_wd) != ed) begin
        failures++;
        $display("FAIL m got %0d/%0d/%0d exp %0d/%0d/%0d", m_wb, m_wr, m_wd, e / R, e % R, ed);
      end
    end
  end

  // ---- Hamming expectations (1 cycle) ----
  logic [HR-1:0] h_exp [$];

  task automatic h_issue(input logic [HW-1:0] w, input logic en);
    int mn = HW + 1;
    logic [HR-1:0] e = '0;
    for (int i = 0; i < HR; i++) if ($countones(w ^ hm[i]) < mn) mn = $countones(w ^ hm[i]);
    for (int i = 0; i < HR; i++) e[i] = en && ($countones(w ^ hm[i]) == mn);
    if ($countones(e) > 1) n_htie++;
    if (!en) n_hoff++;
    h_exp.push_back(e);
    h_en = en; h_sword = w; h_search = 1'b1;
  endtask

  always @(posedge clk) begin
    automatic logic was = h_search;
    if (rst_n && was) begin
      logic [HR-1:0] e;
      #1;
      e = h_exp.pop_front();
      checks++;
      if (!h_mv || h_match != e) begin
        failures++; $display("FAIL h match %h exp %h", h_match, e);
      end
    end
  end

  initial begin
    m_bank_en = '1; m_wr_en = 0; m_rd_en = 0; m_rd_winner = 0; m_search = 0;
    m_addr = '0; m_wdata = '0; m_sword = '0; ms1 = 0; prev_search = 0;
    h_en = 1; h_wr_en = 0; h_rd_en = 0; h_search = 0; h_addr = '0; h_wdata = '0; h_sword = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load both memories
    for (int g = 0; g < NB * R; g++) begin
      @(negedge clk);
      m_wr_en = 1; m_addr = 8'(g); m_wdata = rand_mword();
      if (g == 2 * R + 30) m_wdata = mm[R + 30];   // cross-bank duplicate
      mm[g] = m_wdata;
      h_wr_en = (g < HR);
      if (g < HR) begin
        h_addr = 5'(g); h_wdata = (g == 20) ? hm[3] : rand_hword(); hm[g] = h_wdata;
      end
    end
    @(negedge clk); m_wr_en = 0; h_wr_en = 0;
    // searches, both memories every cycle
    for (int t = 0; t < 200; t++) begin
      logic [WB-1:0] w;
      logic [HW-1:0] hw;
      case (t % 3)
        0: w = rand_mword();
        1: begin
             w = mm[$urandom % (NB * R)];
             for (int k = 0; k < 3; k++) begin
               automatic int j = $urandom % W;
               w[j*K +: K] = w[j*K +: K] ^ K'(1 << ($urandom % 3));
             end
           end
        default: w = (t % 2) ? mm[R + 30] : mm[$urandom % (NB * R)];
      endcase
      m_issue(w, (t % 7 == 3) ? NB'($urandom) : (t == 50 ? '0 : '1));
      case (t % 3)
        0: hw = rand_hword();
        1: begin hw = hm[$urandom % HR]; for (int k = 0; k < 20; k++) hw[$urandom % HW] ^= 1'b1; end
        default: hw = hm[3];
      endcase
      h_issue(hw, t != 77);
      @(negedge clk);
    end
    // final exact search in bank 3, then read the winner's word back
    m_issue(mm[3 * R + 44], '1);
    h_search = 0;
    @(negedge clk);
    m_search = 0;
    repeat (3) @(negedge clk);
    m_rd_en = 1; m_rd_winner = 1;
    @(negedge clk);
    m_rd_en = 0; m_rd_winner = 0;
    checks++;
    if (m_rdata_valid && m_rdata == mm[3 * R + 44]) n_readout++;
    else begin failures++; $display("FAIL winner read-out"); end
    // Hamming read-back
    h_rd_en = 1; h_addr = 5'd20;
    @(negedge clk);
    h_rd_en = 0;
    checks++;
    if (h_rdata != hm[3]) begin failures++; $display("FAIL h read-back"); end
    repeat (2) @(negedge clk);
    $display("mechanisms: back_to_back=%0d banks_partly_off=%0d banks_all_off=%0d cross_bank_ties=%0d winner_readout=%0d hamming_ties=%0d hamming_off=%0d",
             n_b2b, n_partial, n_none, n_xtie, n_readout, n_htie, n_hoff);
    checks += 7;
    if (n_b2b == 0)     begin failures++; $display("FAIL never: back-to-back"); end
    if (n_partial == 0) begin failures++; $display("FAIL never: partial activation"); end
    if (n_none == 0)    begin failures++; $display("FAIL never: all banks off"); end
    if (n_xtie == 0)    begin failures++; $display("FAIL never: cross-bank tie"); end
    if (n_readout == 0) begin failures++; $display("FAIL never: winner read-out"); end
    if (n_htie == 0)    begin failures++; $display("FAIL never: hamming tie"); end
    if (n_hoff == 0)    begin failures++; $display("FAIL never: hamming disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

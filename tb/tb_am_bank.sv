// tb_am_bank: one bank with its default size (64 words of 16 x 5 bits).
// Fills the memory with random reference words, then runs back-to-back
// searches (one per cycle) with random inputs, inputs near a stored word and
// inputs tied between two rows.  A reference model computes every row's
// Manhattan distance; one cycle after each search the bank must report the
// lowest-numbered row at the minimum distance, that distance, and match
// lines set exactly for all rows at the minimum.  Also checks read-out of
// the winner through the 2-1 address selector and that a disabled bank
// reports nothing.
module tb_am_bank;
  localparam int unsigned R = 64, W = 16, K = 5, WB = W * K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          en, wr_en, rd_en, rd_winner, search;
  logic [5:0]    addr;
  logic [WB-1:0] wdata, rdata, sword;
  logic          lv, lf;
  logic [5:0]    la;
  logic [8:0]    ld;
  logic [R-1:0]  match;
  logic [WB-1:0] model [R];
  int checks = 0, failures = 0, cycles = 0, ties = 0;

  am_bank #(.R(R), .W(W), .K(K)) dut (
    .clk, .rst_n, .en, .wr_en, .addr, .wdata, .rd_en, .rd_winner, .rdata,
    .search, .search_word(sword), .loc_valid(lv), .loc_found(lf), .loc_addr(la),
    .loc_dist(ld), .match);

  always @(posedge clk) cycles++;

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

  // expected results of the search issued in the previous cycle
  logic          exp_pending;
  int            exp_row, exp_d;
  logic [R-1:0]  exp_m;
  logic          exp_en;

  task automatic issue(input logic [WB-1:0] w);
    int mn = 1 << 20;
    for (int i = 0; i < R; i++) if (mdist(w, model[i]) < mn) mn = mdist(w, model[i]);
    exp_m = '0; exp_row = -1;
    for (int i = R - 1; i >= 0; i--)
      if (mdist(w, model[i]) == mn) begin exp_m[i] = 1'b1; exp_row = i; end
    if ($countones(exp_m) > 1) ties++;
    exp_d = mn;
    exp_en = en;
    sword = w;
    search = 1'b1;
    exp_pending = 1'b1;
  endtask

  always @(posedge clk) begin
    automatic logic was = search;   // search as sampled at this edge
    if (was && exp_pending && rst_n) begin
      #1;
      checks++;
      if (!lv) begin failures++; $display("FAIL no loc_valid one cycle after search"); end
      else if (exp_en) begin
        if (!lf || int'(la) != exp_row || int'(ld) != exp_d || match != exp_m) begin
          failures++;
          $display("FAIL row %0d/%0d dist %0d/%0d match %h/%h", la, exp_row, ld, exp_d, match, exp_m);
        end
      end else if (lf || match != '0) begin
        failures++; $display("FAIL disabled bank reported a winner");
      end
    end
  end

  initial begin
    en = 1; wr_en = 0; rd_en = 0; rd_winner = 0; search = 0; addr = '0; wdata = '0;
    sword = '0; exp_pending = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load
    for (int i = 0; i < R; i++) begin
      @(negedge clk);
      wr_en = 1; addr = 6'(i); wdata = rand_word(); model[i] = wdata;
    end
    // make rows 40 and 41 equal so ties happen
    @(negedge clk); addr = 6'd41; wdata = model[40]; model[41] = model[40];
    @(negedge clk); wr_en = 0;
    // back-to-back searches
    for (int t = 0; t < 300; t++) begin
      logic [WB-1:0] w;
      case (t % 4)
        0: w = rand_word();
        1: begin  // near a stored row: change a few units slightly
             w = model[$urandom % R];
             for (int k = 0; k < 3; k++) begin
               automatic int j = $urandom % W;
               w[j*K +: K] = w[j*K +: K] ^ K'(1 << ($urandom % 2));
             end
           end
        2: w = model[$urandom % R];           // exact match, distance 0
        default: w = model[40];                // tie between rows 40 and 41
      endcase
      issue(w);
      @(negedge clk);
    end
    search = 0;
    @(negedge clk);
    exp_pending = 0;
    // read the last winner's word via the 2-1 Sel (last search: row 40)
    rd_en = 1; rd_winner = 1; addr = 6'd7;
    @(negedge clk);
    rd_en = 0; rd_winner = 0;
    checks++;
    if (rdata != model[40]) begin failures++; $display("FAIL winner read-out"); end
    // disabled bank
    en = 0;
    issue(model[3]);
    @(negedge clk);
    search = 0;
    @(negedge clk);
    exp_pending = 0;
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no tie exercised"); end
    $display("ties=%0d cycles=%0d", ties, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_asl_cache: checks the word-drowsy data array at its default size
// (512 lines x 8 words). Six instances cover the policy, wakeup-latency and
// window-size variants:
//   k = 0  P-ASL, wakeup 1, window 128 (the default)
//   k = 1  B-ASL, wakeup 3, window 128
//   k = 2  P-ASL, wakeup 2, window 128
//   k = 3  P-ASL, wakeup 4, window 128
//   k = 4  P-ASL, wakeup 1, window 64
//   k = 5  B-ASL, wakeup 1, window 1024
// Window ends must come exactly every UW cycles. Random byte-
// enabled writes and reads are checked against a reference copy; every
// request's latency must be 3 cycles for an awake word and 3 + WAKE_LAT for
// a drowsy one. Directed checks: a word wakes alone (the rest of its line
// stays drowsy), P-ASL keeps a word that was used in the last window awake
// across one window end and lets it sleep after the next, and B-ASL puts
// every word to sleep at each window end.
module tb_asl_cache;
  localparam int LINES = 512, WORDS = 8, N = LINES * WORDS, LAT = 3;
  localparam int NK = 6;
  localparam int WL [NK] = '{1, 3, 2, 4, 1, 1};
  localparam bit PA [NK] = '{1, 0, 1, 1, 1, 0};
  localparam int UW [NK] = '{128, 128, 128, 128, 64, 1024};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          valid [NK], ready [NK], we [NK], rv [NK], ev_wk [NK], ev_uw [NK];
  logic [8:0]    line  [NK];
  logic [2:0]    word  [NK];
  logic [63:0]   wd    [NK], rd [NK];
  logic [7:0]    be    [NK];
  logic [N-1:0]  lowvolt [NK];

  for (genvar k = 0; k < NK; k++) begin : g
    asl_cache #(.UW(UW[k]), .WAKE_LAT(WL[k]), .PERF_AWARE(PA[k])) dut (
      .clk, .rst_n, .req_valid(valid[k]), .req_ready(ready[k]), .req_we(we[k]),
      .req_line(line[k]), .req_word(word[k]), .req_wdata(wd[k]), .req_be(be[k]),
      .resp_valid(rv[k]), .resp_rdata(rd[k]), .lowvolt(lowvolt[k]),
      .ev_wakeup(ev_wk[k]), .ev_uw_end(ev_uw[k]));
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  logic [63:0] model [NK][N];
  logic        known [NK][N];
  int n_wake [NK], n_awake [NK];
  bit done [NK] = '{default: 0};

  // returns the latency; checks data and latency
  task automatic access(int k, bit w, int l, int x, logic [63:0] d, logic [7:0] bm, output int lat);
    int idx = l * WORDS + x;
    bit drowsy;
    @(negedge clk);
    valid[k] = 1; we[k] = w; line[k] = 9'(l); word[k] = 3'(x); wd[k] = d; be[k] = bm;
    while (!ready[k]) @(negedge clk);
    @(posedge clk);
    #1 drowsy = lowvolt[k][idx];
    @(negedge clk);
    valid[k] = 0;
    lat = 0;
    while (!rv[k] && lat < 50) begin @(negedge clk); lat++; end
    check(lat == LAT + (drowsy ? WL[k] : 0), $sformatf("k%0d latency %0d (drowsy %0b)", k, lat, drowsy));
    if (drowsy) n_wake[k]++; else n_awake[k]++;
    if (w) begin
      for (int b = 0; b < 8; b++) if (bm[b]) model[k][idx][b*8 +: 8] = d[b*8 +: 8];
      if (bm == 8'hff) known[k][idx] = 1;
    end else if (known[k][idx]) begin
      check(rd[k] == model[k][idx], $sformatf("k%0d read %h expected %h", k, rd[k], model[k][idx]));
    end
  endtask

  task automatic wait_uw_end(int k);
    @(posedge clk);
    while (!ev_uw[k]) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // window period
  int since_uw [NK], n_uw [NK];
  for (genvar k = 0; k < NK; k++) begin : g_uw
    always @(posedge clk) begin
      if (!rst_n) begin since_uw[k] <= 0; n_uw[k] <= 0; end
      else if (ev_uw[k]) begin
        if (n_uw[k] > 0) check(since_uw[k] + 1 == UW[k], $sformatf("k%0d window length %0d", k, since_uw[k] + 1));
        since_uw[k] <= 0; n_uw[k] <= n_uw[k] + 1;
      end else since_uw[k] <= since_uw[k] + 1;
    end
  end

  for (genvar k = 0; k < NK; k++) begin : g_run
    initial begin
      int lat;
      valid[k] = 0; we[k] = 0; line[k] = 0; word[k] = 0; wd[k] = 0; be[k] = 0;
      n_wake[k] = 0; n_awake[k] = 0;
      for (int i = 0; i < N; i++) known[k][i] = 0;
      @(posedge rst_n);
      repeat (2) @(negedge clk);
      check(&lowvolt[k], $sformatf("k%0d all words drowsy after reset", k));
      // a word wakes alone
      access(k, 1, 10, 3, 64'h0123_4567_89ab_cdef, 8'hff, lat);
      check(lat == LAT + WL[k], $sformatf("k%0d first access pays wakeup", k));
      for (int x = 0; x < WORDS; x++)
        check(lowvolt[k][10*WORDS + x] == (x != 3), $sformatf("k%0d only word 3 of line 10 awake", k));
      access(k, 0, 10, 3, '0, '0, lat);
      check(lat == LAT, $sformatf("k%0d second access finds word awake", k));
      // window ends
      wait_uw_end(k);
      check(lowvolt[k][10*WORDS + 3] == !PA[k], $sformatf("k%0d word state after first window end", k));
      wait_uw_end(k);
      check(lowvolt[k][10*WORDS + 3], $sformatf("k%0d word drowsy after an idle window", k));
      // random traffic on a small working set, with reuse
      for (int i = 0; i < 600; i++) begin
        automatic int l = $urandom_range(7), x = $urandom_range(WORDS - 1);
        if ($urandom_range(1) == 1) access(k, 1, l, x, {$urandom, $urandom}, ($urandom_range(3) == 0) ? 8'($urandom) : 8'hff, lat);
        else access(k, 0, l, x, '0, '0, lat);
        repeat (($urandom_range(9) == 0) ? $urandom_range(300) : $urandom_range(20)) @(negedge clk);
      end
      $display("k%0d (%s, wakeup %0d, window %0d): %0d accesses to awake words, %0d wakeups, %0d window ends",
               k, PA[k] ? "P-ASL" : "B-ASL", WL[k], UW[k], n_awake[k], n_wake[k], n_uw[k]);
      check(n_wake[k] > 0 && n_awake[k] > 0, $sformatf("k%0d both access kinds occur", k));
      done[k] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // finish when every requester is done
  initial begin
    @(posedge rst_n);
    repeat (5) @(posedge clk);
    for (int k = 0; k < NK; k++)
      while (!done[k]) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

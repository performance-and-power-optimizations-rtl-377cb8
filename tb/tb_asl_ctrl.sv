// tb_asl_ctrl: checks the word drowsy controller on 4 lines x 8 words with a
// 16-cycle Update Window and 2-cycle wakeup, for P-ASL (k = 0) and B-ASL
// (k = 1). A reference model of the drowsy and status bits is stepped every
// cycle and compared with the supply controls; the window-end pulse period,
// the grant latency (immediate for an awake word, WAKE_LAT cycles for a
// drowsy one) and the rule that only awake words are granted are checked.
module tb_asl_ctrl;
  localparam int LINES = 4, WORDS = 8, N = LINES * WORDS, UW = 16, WL = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         acc_valid [2];
  logic [4:0]   acc_idx   [2];
  logic         acc_grant [2], uw_end [2], ev_wakeup [2];
  logic [N-1:0] lowvolt   [2];

  for (genvar k = 0; k < 2; k++) begin : g
    asl_ctrl #(.LINES(LINES), .WORDS(WORDS), .UW(UW), .WAKE_LAT(WL), .PERF_AWARE(k == 0)) dut (
      .clk, .rst_n, .acc_valid(acc_valid[k]), .acc_idx(acc_idx[k]), .acc_grant(acc_grant[k]),
      .lowvolt(lowvolt[k]), .uw_end(uw_end[k]), .ev_wakeup(ev_wakeup[k]));
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  logic [N-1:0] m_drowsy [2], m_status [2];
  int cyc = 0, n_uw = 0, n_wake [2], n_kept [2];

  // reference model, stepped with the values seen before each edge
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int k = 0; k < 2; k++) begin
      automatic logic [N-1:0] d = m_drowsy[k];
      automatic logic [N-1:0] s = m_status[k];
      check(uw_end[k] == (cyc % UW == 0), "window end period");
      if (uw_end[k]) begin
        for (int i = 0; i < N; i++) if (k == 0 && m_status[k][i] && !(acc_valid[k] && acc_idx[k] == 5'(i))) n_kept[k]++;
        d = (k == 0) ? ~m_status[k] : '1;
        s = '0;
      end
      if (acc_valid[k]) begin d[acc_idx[k]] = 0; if (k == 0) s[acc_idx[k]] = 1; end
      m_drowsy[k] <= d; m_status[k] <= s;
    end
    if (uw_end[0]) n_uw++;
  end

  // one requester per instance
  for (genvar k = 0; k < 2; k++) begin : g_req
    initial begin
      acc_valid[k] = 0; acc_idx[k] = 0; n_wake[k] = 0;
      @(posedge rst_n);
      repeat (2) @(negedge clk);
      for (int i = 0; i < 400; i++) begin
        automatic int n = 0;
        bit was_drowsy;
        repeat ($urandom_range(4)) @(negedge clk);
        // favour a few hot words so that some stay active across windows
        acc_idx[k] = ($urandom_range(1) == 1) ? 5'($urandom_range(2)) : 5'($urandom_range(N - 1));
        acc_valid[k] = 1;
        #1;
        was_drowsy = lowvolt[k][acc_idx[k]];
        if (was_drowsy) n_wake[k]++;
        while (!acc_grant[k]) begin
          check(!(acc_grant[k] && lowvolt[k][acc_idx[k]]), "grant only for awake word");
          @(negedge clk); n++; #1;
        end
        check(!lowvolt[k][acc_idx[k]], "granted word is awake");
        check(n == (was_drowsy ? WL : 0), $sformatf("k%0d grant after %0d cycles (drowsy=%0b)", k, n, was_drowsy));
        @(negedge clk);
        acc_valid[k] = 0;
      end
    end
  end

  // compare the supply controls with the model after every edge
  always @(negedge clk) if (rst_n)
    for (int k = 0; k < 2; k++)
      check(lowvolt[k] == m_drowsy[k], $sformatf("k%0d drowsy bits %h expected %h", k, lowvolt[k], m_drowsy[k]));

  initial begin
    m_drowsy[0] = '1; m_drowsy[1] = '1; m_status[0] = '0; m_status[1] = '0;
    n_kept[0] = 0; n_kept[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (4000) @(posedge clk);
    $display("windows %0d, wakeups P-ASL %0d B-ASL %0d, words kept awake by status bit %0d",
             n_uw, n_wake[0], n_wake[1], n_kept[0]);
    check(n_wake[0] > 0 && n_wake[1] > n_wake[0] && n_kept[0] > 0, "P-ASL keeps active words awake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

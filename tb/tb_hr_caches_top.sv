// tb_hr_caches_top: end-to-end test of both caches in the top level, every
// parameter at its default (64 KB 8T cache with WG+RB and one extra write
// cycle; 32 KB P-ASL drowsy array with 128-cycle windows).
//
// 8T cache: after the tag array is cleared, lines are installed by FILL,
// then a random mix of reads, writes (half of them silent when possible),
// writes to absent lines and fills runs over a handful of sets, with every
// response checked against a reference model of the cache contents and the
// latency checked against the request's class. The ASL array runs a random
// read/write stream with pauses longer than a window, checked the same way.
// Each mechanism must occur at least once: Set-Buffer write grouping, silent
// writes, bypassed reads, skipped writebacks, Dirty writebacks, Tag-Buffer
// misses, cache misses, eviction of a modified line; word wakeups, window
// ends, and a word kept awake across a window end.
module tb_hr_caches_top;
  import hrc_pkg::*;

  localparam int SETS = 512, WAYS = 4, TAG_W = 34, LINE_W = 256, RD = 4, WR = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // 8T cache ports
  logic l1_req_valid = 0, l1_req_ready;
  cache_op_e l1_req_op = OP_READ;
  logic [47:0] l1_req_addr = '0;
  logic [63:0] l1_req_wdata = '0;
  logic [7:0]  l1_req_be = '0;
  logic [1:0]  l1_req_fill_way = '0;
  logic [LINE_W-1:0] l1_req_fill_line = '0;
  logic l1_resp_valid, l1_resp_hit, l1_resp_victim_valid, l1_resp_victim_mod;
  logic [1:0] l1_resp_way;
  logic [63:0] l1_resp_rdata;
  logic [TAG_W-1:0] l1_resp_victim_tag;
  logic [LINE_W-1:0] l1_resp_victim_line;
  logic l1_ev_array_rd, l1_ev_array_wr, l1_ev_grouped, l1_ev_silent, l1_ev_bypass, l1_ev_wb_avoided;
  // ASL ports
  logic asl_req_valid = 0, asl_req_ready, asl_req_we = 0;
  logic [8:0] asl_req_line = '0;
  logic [2:0] asl_req_word = '0;
  logic [63:0] asl_req_wdata = '0, asl_resp_rdata;
  logic [7:0] asl_req_be = '0;
  logic asl_resp_valid, asl_ev_wakeup, asl_ev_uw_end;
  logic [4095:0] asl_lowvolt;

  hr_caches_top dut (.*);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  // mechanism counters
  int c_rd, c_wr, c_grp, c_sil, c_byp, c_wba, c_tbmiss, c_cmiss, c_modvict, c_wake, c_uw, c_kept;
  always @(posedge clk) if (rst_n) begin
    c_rd  += int'(l1_ev_array_rd);
    c_wr  += int'(l1_ev_array_wr);
    c_grp += int'(l1_ev_grouped);
    c_sil += int'(l1_ev_silent);
    c_byp += int'(l1_ev_bypass);
    c_wba += int'(l1_ev_wb_avoided);
    c_uw  += int'(asl_ev_uw_end);
  end

  // ---------------- 8T cache driver and model ----------------
  logic [LINE_W-1:0] m_data [SETS][WAYS];
  logic              m_v    [SETS][WAYS];
  logic              m_mod  [SETS][WAYS];
  logic [TAG_W-1:0]  m_tag  [SETS][WAYS];
  logic              t_v = 0, t_dirty = 0;
  int                t_set = 0;

  task automatic l1(cache_op_e o, int tag, int set, int word, logic [63:0] d, logic [7:0] bm, int way);
    int lat, exp_lat, hw;
    bit hit, tbh, silent;
    logic [LINE_W-1:0] fl;
    for (int i = 0; i < LINE_W / 32; i++) fl[i*32 +: 32] = $urandom;
    tbh = t_v && t_set == set;
    if (o == OP_READ) exp_lat = tbh ? 2 : 2 + RD;
    else if (tbh) exp_lat = 2;
    else begin
      exp_lat = t_dirty ? 4 + WR + RD : 3 + RD;
      t_v = 1; t_set = set; t_dirty = 0;
      c_tbmiss++;
    end
    @(negedge clk);
    l1_req_valid = 1; l1_req_op = o;
    l1_req_addr = {TAG_W'(tag), 9'(set), 2'(word), 3'b0};
    l1_req_wdata = d; l1_req_be = bm; l1_req_fill_way = 2'(way); l1_req_fill_line = fl;
    while (!l1_req_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    l1_req_valid = 0;
    lat = 0;
    while (!l1_resp_valid && lat < 100) begin @(negedge clk); lat++; end
    check(lat == exp_lat, $sformatf("8T %s latency %0d expected %0d", o.name(), lat, exp_lat));
    hit = 0; hw = 0;
    for (int w = 0; w < WAYS; w++) if (m_v[set][w] && m_tag[set][w] == TAG_W'(tag)) begin hit = 1; hw = w; end
    if (o == OP_READ) begin
      check(l1_resp_hit == hit, "8T read hit flag");
      if (hit) check(l1_resp_rdata == m_data[set][hw][word*64 +: 64], "8T read data");
      else c_cmiss++;
    end else if (o == OP_WRITE) begin
      check(l1_resp_hit == hit, "8T write hit flag");
      if (!hit) c_cmiss++;
      else begin
        silent = 1;
        for (int b = 0; b < 8; b++) if (bm[b] && m_data[set][hw][word*64 + b*8 +: 8] != d[b*8 +: 8]) silent = 0;
        for (int b = 0; b < 8; b++) if (bm[b]) m_data[set][hw][word*64 + b*8 +: 8] = d[b*8 +: 8];
        if (!silent) begin t_dirty = 1; m_mod[set][hw] = 1; end
      end
    end else begin
      check(l1_resp_victim_valid == m_v[set][way], "8T victim valid");
      if (m_v[set][way]) begin
        check(l1_resp_victim_line == m_data[set][way] && l1_resp_victim_tag == m_tag[set][way] &&
              l1_resp_victim_mod == m_mod[set][way], "8T victim line, tag and state");
        if (m_mod[set][way]) c_modvict++;
      end
      m_v[set][way] = 1; m_mod[set][way] = 0; m_tag[set][way] = TAG_W'(tag); m_data[set][way] = fl;
      t_dirty = 1;
    end
  endtask

  // ---------------- ASL driver and model ----------------
  logic [63:0] a_model [4096];
  bit          a_known [4096];
  int          a_done = 0;

  task automatic asl(bit w, int l, int x, logic [63:0] d);
    int lat, idx = l * 8 + x;
    bit drowsy;
    @(negedge clk);
    asl_req_valid = 1; asl_req_we = w; asl_req_line = 9'(l); asl_req_word = 3'(x);
    asl_req_wdata = d; asl_req_be = 8'hff;
    while (!asl_req_ready) @(negedge clk);
    @(posedge clk);
    #1 drowsy = asl_lowvolt[idx];
    @(negedge clk);
    asl_req_valid = 0;
    lat = 0;
    while (!asl_resp_valid && lat < 50) begin @(negedge clk); lat++; end
    check(lat == (drowsy ? 4 : 3), $sformatf("ASL latency %0d drowsy %0b", lat, drowsy));
    if (drowsy) c_wake++;
    if (w) begin a_model[idx] = d; a_known[idx] = 1; end
    else if (a_known[idx]) check(asl_resp_rdata == a_model[idx], "ASL read data");
  endtask

  // a word accessed in one window and still awake just after the window end
  logic [4095:0] prev_lv;
  always @(posedge clk) begin
    if (rst_n && asl_ev_uw_end) begin
      #1;
      if ((~asl_lowvolt & ~prev_lv) != '0) c_kept++;
    end
    prev_lv <= asl_lowvolt;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      m_v[s][w] = 0; m_mod[s][w] = 0; m_tag[s][w] = '0; m_data[s][w] = '0;
    end
    for (int i = 0; i < 4096; i++) a_known[i] = 0;
    {c_rd, c_wr, c_grp, c_sil, c_byp, c_wba, c_tbmiss, c_cmiss, c_modvict, c_wake, c_uw, c_kept} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : l1_stream
        automatic int sets [5] = '{0, 1, 77, 300, 511};
        while (!l1_req_ready) @(posedge clk);
        for (int s = 0; s < 5; s++) for (int w = 0; w < 3; w++) l1(OP_FILL, w + 1, sets[s], 0, '0, '0, w);
        for (int i = 0; i < 2500; i++) begin
          automatic int s = sets[$urandom_range(4)], t = $urandom_range(4), x = $urandom_range(3), r = $urandom_range(99);
          automatic logic [63:0] d = {$urandom, $urandom};
          if (r < 45) l1(OP_READ, t, s, x, '0, '0, 0);
          else if (r < 93) begin
            if ($urandom_range(1) == 1)
              for (int w = 0; w < WAYS; w++) if (m_v[s][w] && m_tag[s][w] == TAG_W'(t)) d = m_data[s][w][x*64 +: 64];
            l1(OP_WRITE, t, s, x, d, 8'hff, 0);
          end else l1(OP_FILL, t, s, 0, '0, '0, $urandom_range(3));
        end
      end
      begin : asl_stream
        for (int i = 0; i < 1500; i++) begin
          automatic int l = $urandom_range(15), x = $urandom_range(7);
          asl($urandom_range(1) == 1, l, x, {$urandom, $urandom});
          repeat (($urandom_range(9) == 0) ? $urandom_range(300) : $urandom_range(10)) @(negedge clk);
        end
      end
    join
    $display("8T cache: array reads %0d, array writes %0d, grouped writes %0d, silent writes %0d, bypassed reads %0d,",
             c_rd, c_wr, c_grp, c_sil, c_byp);
    $display("          writebacks skipped %0d, Tag-Buffer misses %0d, cache misses %0d, modified victims %0d",
             c_wba, c_tbmiss, c_cmiss, c_modvict);
    $display("ASL: wakeups %0d, window ends %0d, window ends keeping an active word awake %0d", c_wake, c_uw, c_kept);
    check(c_grp > 0, "write grouping happened");
    check(c_sil > 0, "silent write happened");
    check(c_byp > 0, "read bypass happened");
    check(c_wba > 0, "writeback skipped");
    check(c_wr > 0, "Dirty writeback happened");
    check(c_tbmiss > 0, "Tag-Buffer miss happened");
    check(c_cmiss > 0, "cache miss happened");
    check(c_modvict > 0, "modified victim evicted");
    check(c_wake > 0, "word wakeup happened");
    check(c_uw > 0, "window end happened");
    check(c_kept > 0, "active word kept awake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

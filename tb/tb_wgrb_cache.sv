// tb_wgrb_cache: self-checking test of the 8T-cell cache with Write Grouping.
//
// Four instances run at default size:
//   k = 0  WG+RB, one extra write cycle (the default dual-threshold cell),
//   k = 1  WG,    one extra write cycle,
//   k = 2  WG+RB, two extra write cycles (pessimistic dual-threshold cell),
//   k = 3  WG+RB, no extra write cycle (regular 8T cell),
//   k = 4  WG,    1-cycle array read and 1 + 1-cycle array write,
//   k = 5  WG+RB, 2-cycle array read and 2 + 1-cycle array write.
// For each, the testbench
//   1. waits for the tag-array clearing after reset,
//   2. installs lines in sets a, b and d by FILL, then makes the Set-Buffer
//      hold set d with Dirty clear (a silent write), so that it holds no
//      useful set,
//   3. issues the request stream  R_a W_b W_b R_b R_b W_b W_a(silent) R_b R_a
//      and checks the exact order of array reads and writes it causes:
//        WG   : R_a R_b W_b R_b R_b W_b R_a R_b R_a   (9 accesses)
//        WG+RB: R_a R_b W_b R_a R_b                   (5 accesses)
//      against 13 for plain Read-Modify-Write,
//   4. runs random reads, writes (a share of them silent) and fills over a
//      few sets and tags, checking every response (hit, data, way, victim
//      line and its state) against a reference model of the cache contents,
//      the latency in cycles and the number of array reads and writes
//      predicted by a model of the Tag-Buffer.
module tb_wgrb_cache;
  import hrc_pkg::*;

  localparam int SETS = 512, WAYS = 4, LB = 32, WB = 8, AW = 48;
  localparam int NK = 6;
  localparam int RDL   [NK] = '{4, 4, 4, 4, 1, 2};
  localparam int WRB   [NK] = '{4, 4, 4, 4, 1, 2};
  localparam int EXTRA [NK] = '{1, 1, 2, 0, 1, 1};
  localparam bit BYP   [NK] = '{1, 0, 1, 1, 0, 1};
  localparam int OFF_W = 5, SET_W = 9, TAG_W = AW - OFF_W - SET_W;
  localparam int LINE_W = LB * 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // per-instance signals
  logic              valid [NK];
  logic              ready [NK];
  cache_op_e         op    [NK];
  logic [AW-1:0]     addr  [NK];
  logic [63:0]       wdata [NK];
  logic [7:0]        be    [NK];
  logic [1:0]        fway  [NK];
  logic [LINE_W-1:0] fline [NK];
  logic              rv    [NK], rhit [NK], vval [NK], vmod [NK];
  logic [1:0]        rway  [NK];
  logic [63:0]       rdata [NK];
  logic [TAG_W-1:0]  vtag  [NK];
  logic [LINE_W-1:0] vline [NK];
  logic              e_rd [NK], e_wr [NK], e_grp [NK], e_sil [NK], e_byp [NK], e_wba [NK];

  for (genvar k = 0; k < NK; k++) begin : g_dut
    wgrb_cache #(.READ_BYPASS(BYP[k]), .RD_LAT(RDL[k]), .WR_LAT_BASE(WRB[k]),
                 .WR_EXTRA(EXTRA[k])) dut (
      .clk, .rst_n,
      .req_valid(valid[k]), .req_ready(ready[k]), .req_op(op[k]), .req_addr(addr[k]),
      .req_wdata(wdata[k]), .req_be(be[k]), .req_fill_way(fway[k]), .req_fill_line(fline[k]),
      .resp_valid(rv[k]), .resp_hit(rhit[k]), .resp_way(rway[k]), .resp_rdata(rdata[k]),
      .resp_victim_valid(vval[k]), .resp_victim_mod(vmod[k]), .resp_victim_tag(vtag[k]),
      .resp_victim_line(vline[k]),
      .ev_array_rd(e_rd[k]), .ev_array_wr(e_wr[k]), .ev_grouped(e_grp[k]),
      .ev_silent(e_sil[k]), .ev_bypass(e_byp[k]), .ev_wb_avoided(e_wba[k])
    );
  end

  // array-traffic trace and mechanism counters
  int  n_rd [NK], n_wr [NK], n_grp [NK], n_sil [NK], n_byp [NK], n_wba [NK];
  string trace [NK];
  logic [SET_W-1:0] cur_set [NK];
  // (counted only out of reset: before the first clock edge the registers
  // have not yet been reset)
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NK; k++) begin
      if (e_rd[k]) begin n_rd[k]++; trace[k] = {trace[k], "R"}; end
      if (e_wr[k]) begin n_wr[k]++; trace[k] = {trace[k], "W"}; end
      if (e_grp[k]) n_grp[k]++;
      if (e_sil[k]) n_sil[k]++;
      if (e_byp[k]) n_byp[k]++;
      if (e_wba[k]) n_wba[k]++;
    end
  end

  // ---------------- reference model ----------------
  logic [LINE_W-1:0] m_data [NK][SETS][WAYS];
  logic              m_v    [NK][SETS][WAYS];
  logic              m_mod  [NK][SETS][WAYS];
  logic [TAG_W-1:0]  m_tag  [NK][SETS][WAYS];
  logic              t_v [NK], t_dirty [NK];
  logic [SET_W-1:0]  t_set [NK];

  function automatic logic [AW-1:0] mk_addr(int tag, int set, int word);
    return {TAG_W'(tag), SET_W'(set), 2'(word), 3'b000};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // Issue one request to instance k and check it against the model.
  task automatic req(int k, cache_op_e o, logic [AW-1:0] a, logic [63:0] wd,
                     logic [7:0] bemask, int way, logic [LINE_W-1:0] line);
    int lat, exp_lat, rd0, wr0, exp_rd, exp_wr, set, tag, word, hw, RD, WR;
    bit tb_hit, hit, silent;
    logic [63:0] cur, exp_word;
    RD   = RDL[k];
    WR   = WRB[k] + EXTRA[k];
    set  = int'(a[OFF_W +: SET_W]);
    tag  = int'(a[OFF_W + SET_W +: TAG_W]);
    word = int'(a[4:3]);
    // Tag-Buffer model: latency and array traffic
    tb_hit = t_v[k] && t_set[k] == SET_W'(set);
    exp_rd = 0; exp_wr = 0;
    if (o == OP_READ) begin
      if (tb_hit && BYP[k])               exp_lat = 2;
      else if (tb_hit && t_dirty[k]) begin exp_lat = 3 + WR + RD; exp_wr = 1; exp_rd = 1; t_dirty[k] = 0; end
      else                                begin exp_lat = 2 + RD; exp_rd = 1; end
    end else begin
      if (tb_hit) exp_lat = 2;
      else begin
        exp_rd = 1;
        if (t_dirty[k]) begin exp_lat = 4 + WR + RD; exp_wr = 1; end
        else exp_lat = 3 + RD;
        t_v[k] = 1; t_set[k] = SET_W'(set); t_dirty[k] = 0;
      end
    end
    // drive
    @(negedge clk);
    valid[k] = 1; op[k] = o; addr[k] = a; wdata[k] = wd; be[k] = bemask;
    fway[k] = 2'(way); fline[k] = line;
    while (!ready[k]) @(negedge clk);
    rd0 = n_rd[k]; wr0 = n_wr[k];
    @(posedge clk);
    @(negedge clk);
    valid[k] = 0;
    lat = 0;
    while (!rv[k] && lat < 100) begin @(negedge clk); lat++; end
    check(rv[k], $sformatf("k%0d response arrives", k));
    check(lat == exp_lat, $sformatf("k%0d op %s set %0d latency %0d expected %0d", k, o.name(), set, lat, exp_lat));
    check(n_rd[k] - rd0 == exp_rd && n_wr[k] - wr0 == exp_wr,
          $sformatf("k%0d op %s array traffic rd %0d wr %0d expected %0d %0d", k, o.name(),
                    n_rd[k] - rd0, n_wr[k] - wr0, exp_rd, exp_wr));
    // content model
    hit = 0; hw = 0;
    for (int w = 0; w < WAYS; w++)
      if (m_v[k][set][w] && m_tag[k][set][w] == TAG_W'(tag)) begin hit = 1; hw = w; end
    case (o)
      OP_READ: begin
        check(rhit[k] == hit, $sformatf("k%0d read hit flag", k));
        if (hit) begin
          exp_word = m_data[k][set][hw][word*64 +: 64];
          check(rdata[k] == exp_word && rway[k] == 2'(hw),
                $sformatf("k%0d read data %h expected %h", k, rdata[k], exp_word));
        end
      end
      OP_WRITE: begin
        check(rhit[k] == hit, $sformatf("k%0d write hit flag", k));
        if (hit) begin
          cur = m_data[k][set][hw][word*64 +: 64];
          silent = 1;
          for (int b = 0; b < 8; b++)
            if (bemask[b] && cur[b*8 +: 8] != wd[b*8 +: 8]) silent = 0;
          for (int b = 0; b < 8; b++)
            if (bemask[b]) m_data[k][set][hw][word*64 + b*8 +: 8] = wd[b*8 +: 8];
          if (!silent) begin t_dirty[k] = 1; m_mod[k][set][hw] = 1; end
        end
      end
      default: begin // OP_FILL
        check(rhit[k] && vval[k] == m_v[k][set][way] && rway[k] == 2'(way),
              $sformatf("k%0d fill victim valid", k));
        if (m_v[k][set][way])
          check(vline[k] == m_data[k][set][way] && vtag[k] == m_tag[k][set][way] &&
                vmod[k] == m_mod[k][set][way], $sformatf("k%0d fill victim line/tag/state", k));
        m_v[k][set][way] = 1; m_mod[k][set][way] = 0;
        m_tag[k][set][way] = TAG_W'(tag); m_data[k][set][way] = line;
        t_dirty[k] = 1;
      end
    endcase
  endtask

  function automatic logic [LINE_W-1:0] rnd_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  // watchdog
  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int SA = 3, SBB = 7, SD = 11, TA = 5, TBB = 9, TD = 2;

  initial begin
    for (int k = 0; k < NK; k++) begin
      valid[k] = 0; op[k] = OP_READ; addr[k] = '0; wdata[k] = '0; be[k] = '0;
      fway[k] = '0; fline[k] = '0; t_v[k] = 0; t_dirty[k] = 0; t_set[k] = '0;
      trace[k] = "";
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          m_v[k][s][w] = 0; m_mod[k][s][w] = 0; m_tag[k][s][w] = '0; m_data[k][s][w] = '0;
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. tag-array clearing: ready rises after one write per set, each
    //    taking the write latency plus one cycle
    begin
      automatic int c = 0;
      automatic int up [NK] = '{default: -1};
      while (up[0] < 0 || up[1] < 0 || up[2] < 0 || up[3] < 0 || up[4] < 0 || up[5] < 0) begin
        @(posedge clk); c++;
        for (int k = 0; k < NK; k++) if (ready[k] && up[k] < 0) up[k] = c;
      end
      for (int k = 0; k < NK; k++)
        check(up[k] >= SETS * (WRB[k] + EXTRA[k] + 1) - 2 && up[k] <= SETS * (WRB[k] + EXTRA[k] + 1) + 4,
              $sformatf("k%0d initialisation takes %0d cycles", k, up[k]));
    end
    for (int k = 0; k < NK; k++) begin
      logic [63:0] wa;
      // 2. set up lines and a clean Set-Buffer holding an unrelated set
      req(k, OP_FILL, mk_addr(TA, SA, 0), '0, '0, 0, rnd_line());
      req(k, OP_FILL, mk_addr(TBB, SBB, 0), '0, '0, 1, rnd_line());
      req(k, OP_FILL, mk_addr(TD, SD, 0), '0, '0, 2, rnd_line());
      req(k, OP_READ, mk_addr(TA, SA, 0), '0, '0, 0, '0);            // forces writeback of d
      req(k, OP_WRITE, mk_addr(TBB, SBB, 1), 64'h1, 8'hff, 0, '0);   // buffer = b, dirty
      req(k, OP_WRITE, mk_addr(TD, SD, 2), m_data[k][SD][2][128 +: 64], 8'hff, 0, '0); // b written back, d clean
      // 3. the request stream of the worked example
      wa = m_data[k][SA][0][64 +: 64];
      trace[k] = "";
      req(k, OP_READ,  mk_addr(TA, SA, 0), '0, '0, 0, '0);
      req(k, OP_WRITE, mk_addr(TBB, SBB, 0), 64'($urandom), 8'h0f, 0, '0);
      req(k, OP_WRITE, mk_addr(TBB, SBB, 2), {$urandom, $urandom}, 8'hff, 0, '0);
      req(k, OP_READ,  mk_addr(TBB, SBB, 0), '0, '0, 0, '0);
      req(k, OP_READ,  mk_addr(TBB, SBB, 2), '0, '0, 0, '0);
      req(k, OP_WRITE, mk_addr(TBB, SBB, 3), {$urandom, $urandom}, 8'hf0, 0, '0);
      req(k, OP_WRITE, mk_addr(TA, SA, 1), wa, 8'hff, 0, '0);      // silent
      req(k, OP_READ,  mk_addr(TBB, SBB, 3), '0, '0, 0, '0);
      req(k, OP_READ,  mk_addr(TA, SA, 1), '0, '0, 0, '0);
      @(negedge clk);
      $display("k%0d (%s) array accesses for the example: %s", k, BYP[k] ? "WG+RB" : "WG", trace[k]);
      check(trace[k] == (BYP[k] ? "RRWRR" : "RRWRRWRRR"),
            $sformatf("k%0d example access order %s", k, trace[k]));
    end
    // 4. random traffic
    for (int k = 0; k < NK; k++) begin
      static int sets_u [4] = '{SA, SBB, SD, 100};
      for (int i = 0; i < 1500; i++) begin
        int s, t, w, r;
        cache_op_e o;
        logic [63:0] d;
        s = sets_u[$urandom_range(3)];
        t = $urandom_range(3);
        w = $urandom_range(3);
        r = $urandom_range(99);
        o = (r < 45) ? OP_READ : (r < 90) ? OP_WRITE : OP_FILL;
        d = {$urandom, $urandom};
        if (o == OP_WRITE && $urandom_range(1) == 1) begin
          // silent write: rewrite what a present line holds
          for (int x = 0; x < WAYS; x++)
            if (m_v[k][s][x] && m_tag[k][s][x] == TAG_W'(t)) d = m_data[k][s][x][w*64 +: 64];
        end
        req(k, o, mk_addr(t, s, w), d, 8'($urandom), $urandom_range(3), rnd_line());
      end
      $display("k%0d: array reads %0d writes %0d, grouped writes %0d, silent %0d, bypassed reads %0d, writebacks avoided %0d",
               k, n_rd[k], n_wr[k], n_grp[k], n_sil[k], n_byp[k], n_wba[k]);
      check(n_grp[k] > 0 && n_sil[k] > 0 && n_wba[k] > 0, $sformatf("k%0d mechanisms exercised", k));
      check(BYP[k] ? n_byp[k] > 0 : n_byp[k] == 0, $sformatf("k%0d bypass use", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

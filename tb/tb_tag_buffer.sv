// tb_tag_buffer: checks the Tag-Buffer: empty after reset (no hit), load of
// set index and tag row with Dirty cleared, set-index hit compare, Dirty set
// and clear (set wins), and the update of one way's tag entry.
module tb_tag_buffer;
  localparam int WAYS = 4, SW = 9, EW = 36;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [SW-1:0] probe_set = 0, load_set = 0, set_q;
  logic hit, load = 0, set_dirty = 0, clr_dirty = 0, ent_we = 0, valid, dirty;
  logic [WAYS*EW-1:0] load_tags = 0, tags_q, m_tags;
  logic [1:0] ent_way = 0;
  logic [EW-1:0] ent_d = 0;
  logic m_valid = 0, m_dirty = 0;
  logic [SW-1:0] m_set = 0;

  tag_buffer #(.WAYS(WAYS), .SET_W(SW), .ENT_W(EW)) dut (.*);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    probe_set = 0; #1;
    check(!hit && !valid && !dirty, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom_range(4) == 0);
      set_dirty = ($urandom_range(3) == 0);
      clr_dirty = ($urandom_range(3) == 0);
      ent_we = ($urandom_range(2) == 0);
      load_set = SW'($urandom_range(3));
      for (int w = 0; w < WAYS; w++) load_tags[w*EW +: EW] = {4'($urandom), $urandom};
      ent_way = 2'($urandom);
      ent_d = {4'($urandom), $urandom};
      probe_set = SW'($urandom_range(3));
      #1;
      check(hit == (m_valid && m_set == probe_set), "hit compare");
      @(posedge clk);
      if (load) begin m_valid = 1; m_set = load_set; m_tags = load_tags; end
      if (set_dirty) m_dirty = 1; else if (load || clr_dirty) m_dirty = 0;
      if (ent_we) m_tags[ent_way*EW +: EW] = ent_d;
      #1;
      check(valid == m_valid && dirty == m_dirty && set_q == m_set, "valid/dirty/set");
      if (m_valid) check(tags_q == m_tags, "tag entries");
    end
    load = 0; set_dirty = 0; clr_dirty = 0; ent_we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

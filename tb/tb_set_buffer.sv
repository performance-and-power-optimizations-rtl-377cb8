// tb_set_buffer: checks the Set-Buffer on a 128-bit row: loading from the
// read latches, merging data into the selected byte columns on a load and on
// its own contents, holding its value when idle, and the silent-write flag
// (compared with an independently computed old-versus-new byte comparison).
module tb_set_buffer;
  localparam int W = 128, NB = W / 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, modify = 0, silent;
  logic [W-1:0] latch_in = 0, mod_data = 0, sb_q, model;
  logic [NB-1:0] mod_mask = 0;

  set_buffer #(.ROW_W(W)) dut (.*);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); load = 1; latch_in = rnd(); modify = 0;
    @(negedge clk); load = 0; model = latch_in;
    check(sb_q == model, "plain load");
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] base, nd;
      logic exp_sil;
      automatic int kind = $urandom_range(3);
      load = (kind == 0); modify = (kind != 3);
      latch_in = rnd();
      mod_mask = NB'({$urandom, $urandom});
      if ($urandom_range(3) == 0) mod_mask = '0;
      base = load ? latch_in : model;
      nd = rnd();
      // make some writes silent, some partially silent
      for (int b = 0; b < NB; b++) if ($urandom_range(2) != 0) nd[b*8 +: 8] = base[b*8 +: 8];
      if ($urandom_range(2) == 0) nd = base;
      mod_data = nd;
      exp_sil = 1;
      for (int b = 0; b < NB; b++)
        if (mod_mask[b] && base[b*8 +: 8] != nd[b*8 +: 8]) exp_sil = 0;
      #1;
      if (modify) check(silent == exp_sil, $sformatf("silent flag %0b expected %0b", silent, exp_sil));
      if (load || modify)
        for (int b = 0; b < NB; b++) model[b*8 +: 8] = (modify && mod_mask[b]) ? nd[b*8 +: 8] : base[b*8 +: 8];
      @(negedge clk);
      check(sb_q == model, $sformatf("buffer contents after kind %0d", kind));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

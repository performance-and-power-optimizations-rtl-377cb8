// tb_sram8t_array: checks the row-wide 1R1W array model. Random whole-row
// writes and reads (against a reference copy) on a 16 x 64 array, the read
// and write latencies in cycles, the hold behaviour of the read latches, and
// a read and a write in flight at the same time on different rows.
module tb_sram8t_array;
  localparam int ROWS = 16, W = 64, RDL = 4, WRL = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rd_start = 0, wr_start = 0, rd_done, wr_done, rd_busy, wr_busy;
  logic [3:0] rd_row = 0, wr_row = 0;
  logic [W-1:0] rd_latch, wr_data = 0;
  logic [W-1:0] model [ROWS];

  sram8t_array #(.ROWS(ROWS), .ROW_W(W), .RD_LAT(RDL), .WR_LAT(WRL)) dut (.*);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic do_write(int r, logic [W-1:0] d);
    automatic int n = 0;
    @(negedge clk); wr_start = 1; wr_row = 4'(r); wr_data = d;
    @(negedge clk); wr_start = 0; wr_data = ~d;   // data must have been sampled
    n = 1;
    while (!wr_done && n < 50) begin @(negedge clk); n++; end
    check(n == WRL, $sformatf("write latency %0d", n));
    model[r] = d;
  endtask

  task automatic do_read(int r);
    automatic int n = 0;
    @(negedge clk); rd_start = 1; rd_row = 4'(r);
    @(negedge clk); rd_start = 0; rd_row = 4'(r + 1);
    n = 1;
    while (!rd_done && n < 50) begin @(negedge clk); n++; end
    check(n == RDL, $sformatf("read latency %0d", n));
    check(rd_latch == model[r], $sformatf("row %0d read %h expected %h", r, rd_latch, model[r]));
    repeat (3) @(negedge clk);
    check(rd_latch == model[r], "read latch holds its value");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) do_write(r, {$urandom, $urandom});
    for (int i = 0; i < 200; i++) begin
      automatic int r = $urandom_range(ROWS - 1);
      if ($urandom_range(1) == 1) do_write(r, {$urandom, $urandom}); else do_read(r);
    end
    // read of row 2 while row 9 is being written
    begin
      automatic logic [W-1:0] d = {$urandom, $urandom};
      @(negedge clk); wr_start = 1; wr_row = 9; wr_data = d; rd_start = 1; rd_row = 2;
      @(negedge clk); wr_start = 0; rd_start = 0;
      repeat (RDL - 1) @(negedge clk);
      check(rd_done && rd_latch == model[2], "overlapped read");
      repeat (WRL - RDL) @(negedge clk);
      check(wr_done, "overlapped write completes");
      model[9] = d;
      do_read(9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

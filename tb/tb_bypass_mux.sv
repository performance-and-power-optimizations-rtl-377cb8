// tb_bypass_mux: checks the Data-out path: with bypass high the selected
// word and line come from the Set-Buffer row, with bypass low from the read
// latches, for every way and word position of a 4-way, 32-byte-line row.
module tb_bypass_mux;
  localparam int ROW_W = 1024, WAYS = 4, WW = 64, LW = ROW_W / WAYS;
  int checks = 0, failures = 0;
  logic bypass;
  logic [ROW_W-1:0] sb_row, rbl_row, src;
  logic [1:0] way, word;
  logic [WW-1:0] data_out;
  logic [LW-1:0] line_out;

  bypass_mux #(.ROW_W(ROW_W), .WAYS(WAYS), .WORD_W(WW)) dut (.*);

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int j = 0; j < ROW_W / 32; j++) begin
        sb_row[j*32 +: 32] = $urandom;
        rbl_row[j*32 +: 32] = $urandom;
      end
      for (int w = 0; w < WAYS; w++)
        for (int x = 0; x < 4; x++) begin
          bypass = 1'($urandom); way = 2'(w); word = 2'(x);
          #1;
          src = bypass ? sb_row : rbl_row;
          checks++;
          if (data_out != src[w*LW + x*WW +: WW] || line_out != src[w*LW +: LW]) begin
            failures++; $display("FAIL: way %0d word %0d bypass %0b", w, x, bypass);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

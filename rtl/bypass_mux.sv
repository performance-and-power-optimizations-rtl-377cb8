// bypass_mux: Data-out path of the 8T cache with Read Bypassing.
//
// One 2:1 multiplexer per column chooses, under the controller's Bypass
// signal, between the Set-Buffer (bypass = 1) and the read bit lines / read
// latches (bypass = 0). The column multiplexer that follows routes the
// selected word of the row (way and word offset) to Data-out, and the whole
// line of that way to line_out (used to return a victim line on a fill).
// Purely combinational.
module bypass_mux #(
  parameter int unsigned ROW_W  = 1024,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned WORD_W = 64
) (
  input  logic                          bypass,
  input  logic [ROW_W-1:0]              sb_row,
  input  logic [ROW_W-1:0]              rbl_row,
  input  logic [$clog2(WAYS)-1:0]       way,
  input  logic [$clog2(ROW_W/WAYS/WORD_W)-1:0] word,
  output logic [WORD_W-1:0]             data_out,
  output logic [ROW_W/WAYS-1:0]         line_out
);
  localparam int unsigned LINE_W = ROW_W / WAYS;

  logic [ROW_W-1:0] col;

  assign col      = bypass ? sb_row : rbl_row;
  assign line_out = col[way*LINE_W +: LINE_W];
  assign data_out = line_out[word*WORD_W +: WORD_W];

endmodule

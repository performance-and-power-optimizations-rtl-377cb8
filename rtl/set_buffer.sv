// set_buffer: the one-set buffer of Write Grouping.
//
// It sits between the per-column write-back multiplexers and the write
// drivers of the 8T array and holds a full copy of one cache set, so that a
// stream of writes to the same set can be merged into it without an array
// access per write. In each column the multiplexer picks the new Data-in for
// the selected columns and the old value (read latch or current buffer
// contents) for the half-selected ones.
//
//   load   : the base row is the read latches (latch_in); otherwise it is the
//            buffer's own contents.
//   modify : the bytes flagged in mod_mask take mod_data; the others keep the
//            base row.
// The buffer is written at the clock edge when load or modify is high.
// silent is combinational and valid while modify is high: it is 1 when every
// selected byte already holds the value being written (a silent write), found
// with one comparator per byte column. Byte granularity of the selected
// columns is this design's choice; the thesis counts one comparator per
// column of the row.
module set_buffer #(
  parameter int unsigned ROW_W = 1024
) (
  input  logic               clk,
  input  logic               load,
  input  logic [ROW_W-1:0]   latch_in,
  input  logic               modify,
  input  logic [ROW_W/8-1:0] mod_mask,
  input  logic [ROW_W-1:0]   mod_data,
  output logic [ROW_W-1:0]   sb_q,
  output logic               silent
);
  localparam int unsigned NB = ROW_W / 8;

  logic [ROW_W-1:0] base, merged;
  logic [NB-1:0]    byte_eq;

  always_comb begin
    base = load ? latch_in : sb_q;
    for (int b = 0; b < NB; b++) begin
      byte_eq[b] = (base[b*8 +: 8] == mod_data[b*8 +: 8]);
      merged[b*8 +: 8] = (modify && mod_mask[b]) ? mod_data[b*8 +: 8] : base[b*8 +: 8];
    end
    silent = &(byte_eq | ~mod_mask);
  end

  always_ff @(posedge clk) begin
    if (load || modify) sb_q <= merged;
  end

endmodule

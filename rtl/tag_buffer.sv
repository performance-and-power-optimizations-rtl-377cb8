// tag_buffer: Tag-Buffer of Write Grouping, with the Dirty bit.
//
// It records which cache set the Set-Buffer holds (set index), the tag entry
// of every way of that set, and the Dirty bit that says the Set-Buffer differs
// from the array row. Every request probes it: hit is high when the buffer is
// valid and the request's set index equals the buffered one. The thesis
// puts the Dirty bit, the set index and one tag per way in the Tag-Buffer;
// the valid flag (the buffer is empty after reset) is this design's addition.
// Each tag entry is {valid, modified, tag}: 'modified' is the write-back
// state of the line towards the next level, not the Set-Buffer's Dirty bit.
//
//   load      : take set index and tag row (from the tag array's read
//               latches), mark valid, clear Dirty.
//   set_dirty / clr_dirty : update Dirty (set wins).
//   ent_we    : overwrite the tag entry of way ent_way with ent_d.
// All updates happen at the clock edge; hit and the stored fields are
// available combinationally.
module tag_buffer #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned SET_W = 9,
  parameter int unsigned ENT_W = 36
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [SET_W-1:0]        probe_set,
  output logic                    hit,
  input  logic                    load,
  input  logic [SET_W-1:0]        load_set,
  input  logic [WAYS*ENT_W-1:0]   load_tags,
  input  logic                    set_dirty,
  input  logic                    clr_dirty,
  input  logic                    ent_we,
  input  logic [$clog2(WAYS)-1:0] ent_way,
  input  logic [ENT_W-1:0]        ent_d,
  output logic                    valid,
  output logic                    dirty,
  output logic [SET_W-1:0]        set_q,
  output logic [WAYS*ENT_W-1:0]   tags_q
);
  assign hit = valid && (set_q == probe_set);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      dirty <= 1'b0;
      set_q <= '0;
    end else begin
      if (load) begin
        valid <= 1'b1;
        set_q <= load_set;
      end
      if (set_dirty)                dirty <= 1'b1;
      else if (load || clr_dirty)   dirty <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load) tags_q <= load_tags;
    if (ent_we) tags_q[ent_way*ENT_W +: ENT_W] <= ent_d;
  end

endmodule

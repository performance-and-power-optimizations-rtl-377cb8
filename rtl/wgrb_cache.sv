// wgrb_cache: L1 data cache built from 8T cells, with Write Grouping and
// (optionally) Read Bypassing in front of a Read-Modify-Write array.
//
// An 8T array cannot write part of a row, so every write must read the
// addressed set, modify it and write the whole row back. Here the row read
// for a write is kept in a Set-Buffer and the writeback is delayed: further
// writes to the same set are merged into the buffer, the writeback happens
// only when another set needs the buffer (or, without bypassing, when the
// same set is read), and it is skipped if every merged write was silent. With
// READ_BYPASS = 1 a read of the buffered set is answered from the Set-Buffer.
//
// Organisation (defaults): 64 KB, 4 ways, 32-byte lines, 512 sets, 48-bit
// physical address; one array row holds one whole set (4 x 256 bits), and a
// second 8T array of the same depth holds the set's tag entries
// {valid, modified, tag}. The Tag-Buffer caches the entries of the buffered
// set, so a request that hits it needs no tag-array access either.
//
// Interface: one request at a time, valid/ready. req_op is READ (one 64-bit
// word), WRITE (one word with byte enables) or FILL (install req_fill_line
// with the address tag into way req_fill_way, returning the old line of that
// way as victim). A WRITE to a line that is not present does nothing and
// answers resp_hit = 0; allocation is the requester's job (FILL, then
// retry). The response is a one-cycle resp_valid pulse with no back-pressure.
// After reset the tag array is cleared row by row before req_ready rises.
//
// Timing, from the request handshake edge to resp_valid (RD = RD_LAT,
// WR = WR_LAT_BASE + WR_EXTRA):
//   write hit in Tag-Buffer, bypassed read ........ 2
//   read that misses the Tag-Buffer (or WG read hit, clean) .. 2 + RD
//   WG read hit, Dirty ............................ 3 + WR + RD
//   write/fill missing the Tag-Buffer ............ 3 + RD  (+ WR + 1 if Dirty)
// The one-cycle probe, modify and bypass steps and the 4-cycle array access
// follow the thesis; WR_EXTRA = 1 is the extra write cycle of the
// dual-threshold 8T cell (high-Vt write path, unchanged read path).
// ev_* outputs pulse once per event, for counting array traffic.
module wgrb_cache
  import hrc_pkg::*;
#(
  parameter int unsigned SETS        = 512,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned WORD_BYTES  = 8,
  parameter int unsigned ADDR_W      = 48,
  parameter int unsigned RD_LAT      = 4,
  parameter int unsigned WR_LAT_BASE = 4,
  parameter int unsigned WR_EXTRA    = 1,
  parameter bit          READ_BYPASS = 1'b1,
  // derived
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - SET_W,
  localparam int unsigned WAY_W  = $clog2(WAYS),
  localparam int unsigned WORD_W = WORD_BYTES * 8,
  localparam int unsigned LINE_W = LINE_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // request
  input  logic                  req_valid,
  output logic                  req_ready,
  input  cache_op_e             req_op,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [WORD_W-1:0]     req_wdata,
  input  logic [WORD_BYTES-1:0] req_be,
  input  logic [WAY_W-1:0]      req_fill_way,
  input  logic [LINE_W-1:0]     req_fill_line,
  // response
  output logic                  resp_valid,
  output logic                  resp_hit,
  output logic [WAY_W-1:0]      resp_way,
  output logic [WORD_W-1:0]     resp_rdata,
  output logic                  resp_victim_valid,
  output logic                  resp_victim_mod,
  output logic [TAG_W-1:0]      resp_victim_tag,
  output logic [LINE_W-1:0]     resp_victim_line,
  // events
  output logic                  ev_array_rd,
  output logic                  ev_array_wr,
  output logic                  ev_grouped,
  output logic                  ev_silent,
  output logic                  ev_bypass,
  output logic                  ev_wb_avoided
);
  localparam int unsigned ROW_W  = WAYS * LINE_W;
  localparam int unsigned ENT_W  = TAG_W + 2;          // {valid, modified, tag}
  localparam int unsigned TROW_W = WAYS * ENT_W;
  localparam int unsigned WPL    = LINE_BYTES / WORD_BYTES;
  localparam int unsigned WSEL_W = (WPL > 1) ? $clog2(WPL) : 1;
  localparam int unsigned WR_LAT = WR_LAT_BASE + WR_EXTRA;

  // ---------------- captured request ----------------
  cache_op_e           op_q;
  logic [ADDR_W-1:0]   addr_q;
  logic [WORD_W-1:0]   wdata_q;
  logic [WORD_BYTES-1:0] be_q;
  logic [WAY_W-1:0]    fway_q;
  logic [LINE_W-1:0]   fline_q;

  logic [SET_W-1:0]    set_q;
  logic [TAG_W-1:0]    tag_q;
  logic [WSEL_W-1:0]   word_q;

  assign set_q  = addr_q[OFF_W +: SET_W];
  assign tag_q  = addr_q[OFF_W + SET_W +: TAG_W];
  assign word_q = WSEL_W'(addr_q[OFF_W-1:0] / WORD_BYTES);

  // ---------------- controller ----------------
  logic rd_start, rd_done, wr_start, wr_done, init_active;
  logic [SET_W-1:0] init_row;
  logic accept, tb_load, tb_clr_dirty, modify_cyc, bypass_cyc;
  logic resp_strobe, resp_from_latch;
  logic tb_hit, tb_valid, tb_dirty;
  logic tag_rd_done, tag_wr_done;
  logic d_rd_busy, d_wr_busy, t_rd_busy, t_wr_busy;

  wg_ctrl #(.SETS(SETS), .READ_BYPASS(READ_BYPASS)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .op(op_q),
    .tb_valid, .tb_hit, .tb_dirty,
    .rd_start, .rd_done,
    // during S_INIT only the tag array is written
    .wr_start, .wr_done(init_active ? tag_wr_done : wr_done),
    .init_active, .init_row,
    .accept, .tb_load, .tb_clr_dirty, .modify_cyc, .bypass_cyc,
    .resp_strobe, .resp_from_latch,
    .ev_array_rd, .ev_array_wr, .ev_grouped, .ev_wb_avoided
  );

  always_ff @(posedge clk) begin
    if (accept) begin
      op_q    <= req_op;
      addr_q  <= req_addr;
      wdata_q <= req_wdata;
      be_q    <= req_be;
      fway_q  <= req_fill_way;
      fline_q <= req_fill_line;
    end
  end

  // ---------------- arrays ----------------
  logic [ROW_W-1:0]  d_latch, sb_q;
  logic [TROW_W-1:0] t_latch, tb_tags;
  logic [SET_W-1:0]  tb_set;

  sram8t_array #(.ROWS(SETS), .ROW_W(ROW_W), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_data (
    .clk, .rst_n,
    .rd_start, .rd_row(set_q), .rd_latch(d_latch), .rd_done, .rd_busy(d_rd_busy),
    .wr_start(wr_start && !init_active), .wr_row(tb_set), .wr_data(sb_q),
    .wr_done, .wr_busy(d_wr_busy)
  );

  sram8t_array #(.ROWS(SETS), .ROW_W(TROW_W), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_tags (
    .clk, .rst_n,
    .rd_start, .rd_row(set_q), .rd_latch(t_latch), .rd_done(tag_rd_done), .rd_busy(t_rd_busy),
    .wr_start, .wr_row(init_active ? init_row : tb_set),
    .wr_data(init_active ? '0 : tb_tags),
    .wr_done(tag_wr_done), .wr_busy(t_wr_busy)
  );

  // ---------------- tag match ----------------
  logic [TROW_W-1:0] tags_src;
  logic [WAYS-1:0]   way_match;
  logic              tag_hit;
  logic [WAY_W-1:0]  hit_way;

  assign tags_src = resp_from_latch ? t_latch : tb_tags;

  always_comb begin
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      way_match[w] = tags_src[w*ENT_W + ENT_W - 1] &&
                     (tags_src[w*ENT_W +: TAG_W] == tag_q);
      if (way_match[w]) hit_way = WAY_W'(w);
    end
    tag_hit = |way_match;
  end

  // ---------------- Set-Buffer and modify ----------------
  logic [ROW_W/8-1:0] mod_mask;
  logic [ROW_W-1:0]   mod_data;
  logic               do_modify, silent, sel_way_valid;
  logic [WAY_W-1:0]   sel_way;

  assign sel_way   = (op_q == OP_FILL) ? fway_q : hit_way;
  assign do_modify = modify_cyc && ((op_q == OP_FILL) || tag_hit);

  always_comb begin
    mod_mask = '0;
    mod_data = '0;
    if (op_q == OP_FILL) begin
      for (int b = 0; b < LINE_BYTES; b++)
        mod_mask[sel_way*LINE_BYTES + b] = 1'b1;
      mod_data = {WAYS{fline_q}};
    end else begin
      for (int b = 0; b < WORD_BYTES; b++)
        mod_mask[sel_way*LINE_BYTES + word_q*WORD_BYTES + b] = be_q[b];
      mod_data = {(WAYS*WPL){wdata_q}};
    end
  end

  set_buffer #(.ROW_W(ROW_W)) u_sb (
    .clk,
    .load(tb_load), .latch_in(d_latch),
    .modify(do_modify), .mod_mask, .mod_data,
    .sb_q, .silent
  );

  // tag entry update: fill installs {valid, clean, tag}; a non-silent write
  // marks the line modified
  logic [ENT_W-1:0] old_ent, new_ent;
  logic             write_changes, ent_we;

  assign old_ent       = tb_tags[sel_way*ENT_W +: ENT_W];
  assign write_changes = (op_q == OP_FILL) || !silent;
  assign ent_we        = do_modify && write_changes;
  assign new_ent       = (op_q == OP_FILL) ? {1'b1, 1'b0, tag_q}
                                           : (old_ent | {1'b0, 1'b1, {TAG_W{1'b0}}});
  assign sel_way_valid = old_ent[ENT_W-1];

  tag_buffer #(.WAYS(WAYS), .SET_W(SET_W), .ENT_W(ENT_W)) u_tb (
    .clk, .rst_n,
    .probe_set(set_q), .hit(tb_hit),
    .load(tb_load), .load_set(set_q), .load_tags(t_latch),
    .set_dirty(ent_we), .clr_dirty(tb_clr_dirty),
    .ent_we, .ent_way(sel_way), .ent_d(new_ent),
    .valid(tb_valid), .dirty(tb_dirty), .set_q(tb_set), .tags_q(tb_tags)
  );

  // ---------------- Data-out ----------------
  logic [WORD_W-1:0] data_out;
  logic [LINE_W-1:0] line_out;

  bypass_mux #(.ROW_W(ROW_W), .WAYS(WAYS), .WORD_W(WORD_W)) u_bypass (
    .bypass(!resp_from_latch), .sb_row(sb_q), .rbl_row(d_latch),
    .way(sel_way), .word(word_q[$clog2(WPL)-1:0]),
    .data_out, .line_out
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
    end else begin
      resp_valid <= resp_strobe;
    end
  end

  always_ff @(posedge clk) begin
    if (resp_strobe) begin
      resp_hit          <= (op_q == OP_FILL) ? 1'b1 : tag_hit;
      resp_way          <= sel_way;
      resp_rdata        <= data_out;
      resp_victim_valid <= (op_q == OP_FILL) && sel_way_valid;
      resp_victim_mod   <= (op_q == OP_FILL) && old_ent[ENT_W-2];
      resp_victim_tag   <= old_ent[TAG_W-1:0];
      resp_victim_line  <= line_out;
    end
  end

  assign ev_silent = modify_cyc && (op_q == OP_WRITE) && tag_hit && silent;
  assign ev_bypass = bypass_cyc;

  // ---------------- protocol checks ----------------
  a_req_hold : assert property (@(posedge clk) disable iff (!rst_n)
                 req_valid && !req_ready |=> req_valid && $stable(req_op) && $stable(req_addr));
  a_arrays_in_step : assert property (@(posedge clk) disable iff (!rst_n)
                 rd_done == tag_rd_done);
  a_no_overlap : assert property (@(posedge clk) disable iff (!rst_n)
                 !(d_rd_busy && d_wr_busy) && !(t_rd_busy && t_wr_busy));

endmodule

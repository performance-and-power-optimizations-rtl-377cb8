// wg_ctrl: sequencer of the Write Grouping (WG) and Write Grouping + Read
// Bypassing (WG+RB) cache controller for an 8T-cell data array.
//
// One request is handled at a time (valid/ready on the request side). Each
// request first spends one cycle probing the Tag-Buffer (S_PROBE), then:
//   write/fill, Tag-Buffer hit  -> S_MODIFY (merge into the Set-Buffer, no
//                                  array access)
//   write/fill, Tag-Buffer miss -> writeback the Set-Buffer only if Dirty
//                                  (S_WB), read the new set into Set-Buffer
//                                  and Tag-Buffer (S_RDFILL), then S_MODIFY
//   read, Tag-Buffer miss       -> plain array read (S_RDONLY)
//   read, Tag-Buffer hit        -> WG:    writeback if Dirty (S_WB), then a
//                                         plain array read (S_RDONLY)
//                                  WG+RB: answer from the Set-Buffer through
//                                         the bypass multiplexers (S_BYPASS)
// READ_BYPASS selects WG+RB (1) or WG (0). The four scenarios and the one-
// cycle probe, modify and bypass steps follow the thesis; the tag-array
// clearing sequence after reset (S_INIT, one tag-row write per set) is this
// design's addition, since a write-back cache needs its valid bits cleared.
//
// Array operations are started with one-cycle strobes (rd_start, wr_start)
// in the first cycle of S_WB/S_RDONLY/S_RDFILL and completed by rd_done or
// wr_done from the arrays. resp_strobe marks the cycle whose end registers the
// response; resp_from_latch tells the datapath that it comes from the read
// latches rather than from the Set-Buffer and Tag-Buffer.
module wg_ctrl
  import hrc_pkg::*;
#(
  parameter int unsigned SETS        = 512,
  parameter bit          READ_BYPASS = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // request side
  input  logic                    req_valid,
  output logic                    req_ready,
  input  cache_op_e               op,         // op of the captured request
  // Tag-Buffer status
  input  logic                    tb_valid,
  input  logic                    tb_hit,
  input  logic                    tb_dirty,
  // arrays
  output logic                    rd_start,
  input  logic                    rd_done,
  output logic                    wr_start,
  input  logic                    wr_done,
  output logic                    init_active,
  output logic [$clog2(SETS)-1:0] init_row,
  // datapath controls
  output logic                    accept,
  output logic                    tb_load,    // load Tag-Buffer and Set-Buffer
  output logic                    tb_clr_dirty,
  output logic                    modify_cyc,
  output logic                    bypass_cyc,
  output logic                    resp_strobe,
  output logic                    resp_from_latch,
  // events (one-cycle pulses)
  output logic                    ev_array_rd,
  output logic                    ev_array_wr,
  output logic                    ev_grouped,   // write merged with no array access
  output logic                    ev_wb_avoided // eviction or coherency writeback skipped (Dirty = 0)
);
  wg_state_e state, wb_ret;
  logic      issued;
  logic      is_write;

  assign is_write = (op == OP_WRITE) || (op == OP_FILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      wb_ret   <= S_RDONLY;
      issued   <= 1'b0;
      init_row <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
          issued <= 1'b1;
          if (wr_done) begin
            issued <= 1'b0;
            if (init_row == $clog2(SETS)'(SETS - 1)) state <= S_IDLE;
            else init_row <= init_row + 1'b1;
          end
        end
        S_IDLE: begin
          issued <= 1'b0;
          if (req_valid) state <= S_PROBE;
        end
        S_PROBE: begin
          issued <= 1'b0;
          if (!is_write) begin
            if (tb_hit && READ_BYPASS)      state <= S_BYPASS;
            else if (tb_hit && tb_dirty) begin
              state  <= S_WB;
              wb_ret <= S_RDONLY;
            end else                        state <= S_RDONLY;
          end else begin
            if (tb_hit)                     state <= S_MODIFY;
            else if (tb_dirty) begin
              state  <= S_WB;
              wb_ret <= S_RDFILL;
            end else                        state <= S_RDFILL;
          end
        end
        S_WB: begin
          issued <= 1'b1;
          if (wr_done) begin
            issued <= 1'b0;
            state  <= wb_ret;
          end
        end
        S_RDONLY: begin
          issued <= 1'b1;
          if (rd_done) state <= S_IDLE;
        end
        S_RDFILL: begin
          issued <= 1'b1;
          if (rd_done) state <= S_MODIFY;
        end
        S_MODIFY: state <= S_IDLE;
        S_BYPASS: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    req_ready       = (state == S_IDLE);
    accept          = (state == S_IDLE) && req_valid;
    init_active     = (state == S_INIT);
    rd_start        = (state == S_RDONLY || state == S_RDFILL) && !issued;
    wr_start        = (state == S_WB || state == S_INIT) && !issued;
    tb_load         = (state == S_RDFILL) && rd_done;
    tb_clr_dirty    = (state == S_WB) && wr_done;
    modify_cyc      = (state == S_MODIFY);
    bypass_cyc      = (state == S_BYPASS);
    resp_from_latch = (state == S_RDONLY);
    resp_strobe     = ((state == S_RDONLY) && rd_done) || modify_cyc || bypass_cyc;
    ev_array_rd     = rd_start;
    ev_array_wr     = (state == S_WB) && !issued;
    ev_grouped      = (state == S_PROBE) && is_write && tb_hit;
    ev_wb_avoided   = (state == S_PROBE) && tb_valid && !tb_dirty &&
                      ((is_write && !tb_hit) || (!is_write && tb_hit && !READ_BYPASS));
  end

  // The arrays only complete operations the controller started.
  a_done_expected : assert property (@(posedge clk) disable iff (!rst_n)
                      rd_done |-> (state == S_RDONLY || state == S_RDFILL));

endmodule

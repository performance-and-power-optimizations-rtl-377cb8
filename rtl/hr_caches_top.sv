// hr_caches_top: the two cache designs side by side.
//
//   l1_* : the 8T-cell L1 data cache (64 KB, 4-way, 32-byte lines) with
//          Write Grouping and Read Bypassing around its Read-Modify-Write
//          array, built from dual-threshold 8T cells whose extra write cycle
//          is counted in its write latency. See wgrb_cache.
//   asl_*: the 32 KB data array with word-granularity drowsy mode (P-ASL by
//          default). See asl_cache.
// The two caches are independent (they belong to different processor
// configurations) and share only clock and reset. Each port group is that of
// the instantiated block; the ASL per-word supply controls (asl_lowvolt) are
// brought out because the supply switches they drive are analog.
module hr_caches_top
  import hrc_pkg::*;
#(
  // 8T-cell L1 data cache
  parameter int unsigned L1_SETS        = 512,
  parameter int unsigned L1_WAYS        = 4,
  parameter int unsigned L1_LINE_BYTES  = 32,
  parameter int unsigned L1_RD_LAT      = 4,
  parameter int unsigned L1_WR_LAT_BASE = 4,
  parameter int unsigned L1_WR_EXTRA    = 1,
  parameter bit          L1_READ_BYPASS = 1'b1,
  // ASL drowsy cache
  parameter int unsigned ASL_LINES      = 512,
  parameter int unsigned ASL_UW         = 128,
  parameter int unsigned ASL_WAKE_LAT   = 1,
  parameter bit          ASL_PERF_AWARE = 1'b1,
  localparam int unsigned ADDR_W    = 48,
  localparam int unsigned L1_WAY_W  = $clog2(L1_WAYS),
  localparam int unsigned L1_LINE_W = L1_LINE_BYTES * 8,
  localparam int unsigned L1_TAG_W  = ADDR_W - $clog2(L1_LINE_BYTES) - $clog2(L1_SETS),
  localparam int unsigned ASL_N     = ASL_LINES * 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ---- 8T L1 data cache ----
  input  logic                       l1_req_valid,
  output logic                       l1_req_ready,
  input  cache_op_e                  l1_req_op,
  input  logic [ADDR_W-1:0]          l1_req_addr,
  input  logic [63:0]                l1_req_wdata,
  input  logic [7:0]                 l1_req_be,
  input  logic [L1_WAY_W-1:0]        l1_req_fill_way,
  input  logic [L1_LINE_W-1:0]       l1_req_fill_line,
  output logic                       l1_resp_valid,
  output logic                       l1_resp_hit,
  output logic [L1_WAY_W-1:0]        l1_resp_way,
  output logic [63:0]                l1_resp_rdata,
  output logic                       l1_resp_victim_valid,
  output logic                       l1_resp_victim_mod,
  output logic [L1_TAG_W-1:0]        l1_resp_victim_tag,
  output logic [L1_LINE_W-1:0]       l1_resp_victim_line,
  output logic                       l1_ev_array_rd,
  output logic                       l1_ev_array_wr,
  output logic                       l1_ev_grouped,
  output logic                       l1_ev_silent,
  output logic                       l1_ev_bypass,
  output logic                       l1_ev_wb_avoided,
  // ---- ASL drowsy data cache ----
  input  logic                       asl_req_valid,
  output logic                       asl_req_ready,
  input  logic                       asl_req_we,
  input  logic [$clog2(ASL_LINES)-1:0] asl_req_line,
  input  logic [2:0]                 asl_req_word,
  input  logic [63:0]                asl_req_wdata,
  input  logic [7:0]                 asl_req_be,
  output logic                       asl_resp_valid,
  output logic [63:0]                asl_resp_rdata,
  output logic [ASL_N-1:0]           asl_lowvolt,
  output logic                       asl_ev_wakeup,
  output logic                       asl_ev_uw_end
);

  wgrb_cache #(
    .SETS(L1_SETS), .WAYS(L1_WAYS), .LINE_BYTES(L1_LINE_BYTES), .WORD_BYTES(8),
    .ADDR_W(ADDR_W), .RD_LAT(L1_RD_LAT), .WR_LAT_BASE(L1_WR_LAT_BASE),
    .WR_EXTRA(L1_WR_EXTRA), .READ_BYPASS(L1_READ_BYPASS)
  ) u_l1 (
    .clk, .rst_n,
    .req_valid(l1_req_valid), .req_ready(l1_req_ready), .req_op(l1_req_op),
    .req_addr(l1_req_addr), .req_wdata(l1_req_wdata), .req_be(l1_req_be),
    .req_fill_way(l1_req_fill_way), .req_fill_line(l1_req_fill_line),
    .resp_valid(l1_resp_valid), .resp_hit(l1_resp_hit), .resp_way(l1_resp_way),
    .resp_rdata(l1_resp_rdata), .resp_victim_valid(l1_resp_victim_valid),
    .resp_victim_mod(l1_resp_victim_mod), .resp_victim_tag(l1_resp_victim_tag),
    .resp_victim_line(l1_resp_victim_line),
    .ev_array_rd(l1_ev_array_rd), .ev_array_wr(l1_ev_array_wr),
    .ev_grouped(l1_ev_grouped), .ev_silent(l1_ev_silent),
    .ev_bypass(l1_ev_bypass), .ev_wb_avoided(l1_ev_wb_avoided)
  );

  asl_cache #(
    .LINES(ASL_LINES), .WORDS(8), .WORD_W(64), .LAT(3), .UW(ASL_UW),
    .WAKE_LAT(ASL_WAKE_LAT), .PERF_AWARE(ASL_PERF_AWARE)
  ) u_asl (
    .clk, .rst_n,
    .req_valid(asl_req_valid), .req_ready(asl_req_ready), .req_we(asl_req_we),
    .req_line(asl_req_line), .req_word(asl_req_word), .req_wdata(asl_req_wdata),
    .req_be(asl_req_be), .resp_valid(asl_resp_valid), .resp_rdata(asl_resp_rdata),
    .lowvolt(asl_lowvolt), .ev_wakeup(asl_ev_wakeup), .ev_uw_end(asl_ev_uw_end)
  );

endmodule

// asl_ctrl: drowsy-mode controller of an Application Specific Low-leakage
// (ASL) data cache, which manages supply voltage per 8-byte word instead of
// per cache line.
//
// Every word has a drowsy bit. A drowsy word sits at the low retention
// supply, keeps its data, but must not be accessed: its word line is gated.
// The periodic drowsy signal, raised at the end of every Update Window (UW)
// of UW cycles, sets the drowsy bits:
//   PERF_AWARE = 0 (B-ASL): every word goes drowsy.
//   PERF_AWARE = 1 (P-ASL): a status bit per word records an access during
//     the window that just ended; words whose status bit is set stay awake,
//     all others go drowsy, and all status bits are then cleared.
// An access to a drowsy word wakes only that word: its drowsy bit is reset at
// once (the word line resets it), and after WAKE_LAT cycles of supply
// restoration the access is granted. The rest of the line stays drowsy.
//
// Interface: the requester holds acc_valid with acc_idx (line * WORDS + word)
// until acc_grant; in the grant cycle the word is awake and may be accessed.
// Timing: an awake word is granted in the cycle acc_valid rises; a drowsy
// word WAKE_LAT cycles later. A word being accessed or woken is never put to
// sleep by a window end that falls in the same cycle (this design's choice).
// Words start drowsy after reset, also this design's choice. lowvolt is the
// per-word control of the VDD/VDDLow supply switch.
module asl_ctrl #(
  parameter int unsigned LINES      = 512,
  parameter int unsigned WORDS      = 8,
  parameter int unsigned UW         = 128,
  parameter int unsigned WAKE_LAT   = 1,
  parameter bit          PERF_AWARE = 1'b1,
  localparam int unsigned N     = LINES * WORDS,
  localparam int unsigned IDX_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             acc_valid,
  input  logic [IDX_W-1:0] acc_idx,
  output logic             acc_grant,
  output logic [N-1:0]     lowvolt,
  output logic             uw_end,
  output logic             ev_wakeup
);
  localparam int unsigned UW_W = $clog2(UW);
  localparam int unsigned WK_W = (WAKE_LAT > 1) ? $clog2(WAKE_LAT) : 1;

  logic [N-1:0]    drowsy_q, status_q;
  logic [UW_W-1:0] uw_cnt;
  logic            waking;
  logic [WK_W-1:0] wk_cnt;
  logic            word_drowsy;

  assign word_drowsy = drowsy_q[acc_idx];
  assign uw_end      = (uw_cnt == UW_W'(UW - 1));
  assign acc_grant   = acc_valid && !word_drowsy && !(waking && wk_cnt != '0);
  assign ev_wakeup   = acc_valid && word_drowsy;
  assign lowvolt     = drowsy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) uw_cnt <= '0;
    else        uw_cnt <= uw_end ? '0 : uw_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waking <= 1'b0;
      wk_cnt <= '0;
    end else if (ev_wakeup) begin
      waking <= 1'b1;
      wk_cnt <= WK_W'(WAKE_LAT - 1);
    end else if (waking) begin
      if (wk_cnt != '0) wk_cnt <= wk_cnt - 1'b1;
      else if (acc_grant) waking <= 1'b0;
    end
  end

  // Whole-vector update: the accessed word (one-hot sel) is forced awake and
  // marked active; at a window end every other word follows the policy.
  logic [N-1:0] sel, drowsy_d, status_d;

  always_comb begin
    sel      = acc_valid ? (N'(1) << acc_idx) : '0;
    drowsy_d = drowsy_q;
    status_d = status_q;
    if (uw_end) begin
      drowsy_d = PERF_AWARE ? ~status_q : '1;
      status_d = '0;
    end
    drowsy_d = drowsy_d & ~sel;
    status_d = PERF_AWARE ? (status_d | sel) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drowsy_q <= '1;
      status_q <= '0;
    end else begin
      drowsy_q <= drowsy_d;
      status_q <= status_d;
    end
  end

endmodule

// asl_cache: data array of a 32 KB, 4-way, 64-byte-line L1 data cache with
// word-granularity drowsy mode (ASL).
//
// The array holds LINES x WORDS words of 64 bits (line index = set * ways +
// way, chosen by the requester after its tag lookup). Each word has its own
// supply switch (lowvolt) and word-line gate, controlled by asl_ctrl: a word
// is read or written only while it is awake, and touching a drowsy word first
// costs WAKE_LAT wakeup cycles for that word alone.
//
// Interface: one request at a time, valid/ready; req_we selects a byte-
// enabled write or a read of word req_word of line req_line. resp_valid
// pulses once per request (with read data for reads).
// Timing, from the request handshake edge to resp_valid: LAT (3, the data
// cache latency) for an awake word, LAT + WAKE_LAT for a drowsy one. The
// word array is accessed at the first edge after the grant; the remaining
// LAT-1 cycles model the rest of the hit pipeline. Tag lookup and miss
// handling are outside this block.
module asl_cache #(
  parameter int unsigned LINES      = 512,
  parameter int unsigned WORDS      = 8,
  parameter int unsigned WORD_W     = 64,
  parameter int unsigned LAT        = 3,
  parameter int unsigned UW         = 128,
  parameter int unsigned WAKE_LAT   = 1,
  parameter bit          PERF_AWARE = 1'b1,
  localparam int unsigned N      = LINES * WORDS,
  localparam int unsigned LINE_W = $clog2(LINES),
  localparam int unsigned WSEL_W = $clog2(WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid,
  output logic                req_ready,
  input  logic                req_we,
  input  logic [LINE_W-1:0]   req_line,
  input  logic [WSEL_W-1:0]   req_word,
  input  logic [WORD_W-1:0]   req_wdata,
  input  logic [WORD_W/8-1:0] req_be,
  output logic                resp_valid,
  output logic [WORD_W-1:0]   resp_rdata,
  output logic [N-1:0]        lowvolt,
  output logic                ev_wakeup,
  output logic                ev_uw_end
);
  localparam int unsigned IDX_W = $clog2(N);
  localparam int unsigned LC_W  = $clog2(LAT + 1);

  typedef enum logic [1:0] {A_IDLE, A_WAIT, A_PIPE} asl_state_e;

  asl_state_e          state;
  logic                we_q;
  logic [IDX_W-1:0]    idx_q;
  logic [WORD_W-1:0]   wdata_q;
  logic [WORD_W/8-1:0] be_q;
  logic [LC_W-1:0]     lat_cnt;
  logic                grant;
  logic [WORD_W-1:0]   rdata_q;

  logic [WORD_W-1:0] mem [N];

  asl_ctrl #(.LINES(LINES), .WORDS(WORDS), .UW(UW), .WAKE_LAT(WAKE_LAT),
             .PERF_AWARE(PERF_AWARE)) u_ctrl (
    .clk, .rst_n,
    .acc_valid(state == A_WAIT), .acc_idx(idx_q), .acc_grant(grant),
    .lowvolt, .uw_end(ev_uw_end), .ev_wakeup
  );

  assign req_ready = (state == A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= A_IDLE;
      lat_cnt    <= '0;
      resp_valid <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        A_IDLE: if (req_valid) state <= A_WAIT;
        A_WAIT: if (grant) begin
          if (LAT <= 1) begin
            resp_valid <= 1'b1;
            state      <= A_IDLE;
          end else begin
            lat_cnt <= LC_W'(LAT - 1);
            state   <= A_PIPE;
          end
        end
        A_PIPE: begin
          if (lat_cnt == LC_W'(1)) begin
            resp_valid <= 1'b1;
            state      <= A_IDLE;
          end else begin
            lat_cnt <= lat_cnt - 1'b1;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_ready) begin
      we_q    <= req_we;
      idx_q   <= IDX_W'({req_line, req_word});
      wdata_q <= req_wdata;
      be_q    <= req_be;
    end
  end

  // word array behind the word-line gate: accessed only in a grant cycle
  always_ff @(posedge clk) begin
    if (grant) begin
      if (we_q) begin
        for (int b = 0; b < WORD_W / 8; b++)
          if (be_q[b]) mem[idx_q][b*8 +: 8] <= wdata_q[b*8 +: 8];
      end else begin
        rdata_q <= mem[idx_q];
      end
    end
  end

  assign resp_rdata = rdata_q;

  a_gated : assert property (@(posedge clk) disable iff (!rst_n) grant |-> !lowvolt[idx_q]);
  a_req_hold : assert property (@(posedge clk) disable iff (!rst_n)
                 req_valid && !req_ready |=> req_valid);

endmodule

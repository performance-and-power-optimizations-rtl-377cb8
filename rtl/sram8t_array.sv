// sram8t_array: functional model of a bit-interleaved 8T SRAM array as used
// for the data (and tag) store of the reliable L1 cache.
//
// An 8T cell has a read port (read word line, single read bit line) separate
// from its write port (write word line, differential write bit lines). Because
// a write word line drives every cell of the row, a row can only be written
// whole: the half-selected columns must be driven with their own contents.
// The array therefore offers exactly two operations, both on a full row:
//   * read:  rd_start with rd_row; RD_LAT clock edges later (counting the edge
//            that samples rd_start) the whole row sits in the read latches
//            (rd_latch) and rd_done is high for one cycle. rd_latch holds its
//            value until the next read completes.
//   * write: wr_start with wr_row and wr_data (sampled at that edge);
//            the row is committed WR_LAT edges later and wr_done pulses.
// Precharge, sense amplification and the write drivers are folded into these
// two operations; column interleaving is a layout property and does not
// change the function, so the row is modelled as one flat vector.
// The ports are independent (one read and one write may be in flight at once).
// Issuing a new operation on a port that is still busy is a protocol error
// and is flagged by an assertion. The storage is not reset, as an SRAM is not.
module sram8t_array #(
  parameter int unsigned ROWS   = 512,
  parameter int unsigned ROW_W  = 1024,
  parameter int unsigned RD_LAT = 4,
  parameter int unsigned WR_LAT = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_start,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  output logic [ROW_W-1:0]        rd_latch,
  output logic                    rd_done,
  output logic                    rd_busy,
  input  logic                    wr_start,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  logic [ROW_W-1:0]        wr_data,
  output logic                    wr_done,
  output logic                    wr_busy
);
  localparam int unsigned AW = $clog2(ROWS);
  localparam int unsigned CW = $clog2((RD_LAT > WR_LAT ? RD_LAT : WR_LAT) + 1);

  logic [ROW_W-1:0] mem [ROWS];

  logic [AW-1:0]    rd_row_q, wr_row_q;
  logic [CW-1:0]    rd_cnt, wr_cnt;
  logic [ROW_W-1:0] wr_data_q;

  // Read port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy  <= 1'b0;
      rd_done  <= 1'b0;
      rd_cnt   <= '0;
      rd_row_q <= '0;
    end else begin
      rd_done <= 1'b0;
      if (rd_start) begin
        rd_row_q <= rd_row;
        if (RD_LAT <= 1) begin
          rd_done <= 1'b1;
        end else begin
          rd_busy <= 1'b1;
          rd_cnt  <= CW'(RD_LAT - 1);
        end
      end else if (rd_busy) begin
        rd_cnt <= rd_cnt - 1'b1;
        if (rd_cnt == CW'(1)) begin
          rd_busy <= 1'b0;
          rd_done <= 1'b1;
        end
      end
    end
  end

  // Read latches at the bottom of the columns
  always_ff @(posedge clk) begin
    if (rd_start && RD_LAT <= 1)
      rd_latch <= mem[rd_row];
    else if (!rd_start && rd_busy && rd_cnt == CW'(1))
      rd_latch <= mem[rd_row_q];
  end

  // Write port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy  <= 1'b0;
      wr_done  <= 1'b0;
      wr_cnt   <= '0;
      wr_row_q <= '0;
    end else begin
      wr_done <= 1'b0;
      if (wr_start) begin
        wr_row_q <= wr_row;
        if (WR_LAT <= 1) begin
          wr_done <= 1'b1;
        end else begin
          wr_busy <= 1'b1;
          wr_cnt  <= CW'(WR_LAT - 1);
        end
      end else if (wr_busy) begin
        wr_cnt <= wr_cnt - 1'b1;
        if (wr_cnt == CW'(1)) begin
          wr_busy <= 1'b0;
          wr_done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_start) wr_data_q <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (wr_start && WR_LAT <= 1)
      mem[wr_row] <= wr_data;
    else if (!wr_start && wr_busy && wr_cnt == CW'(1))
      mem[wr_row_q] <= wr_data_q;
  end

  // A port accepts a new operation only when idle.
  a_rd_idle : assert property (@(posedge clk) disable iff (!rst_n) rd_start |-> !rd_busy);
  a_wr_idle : assert property (@(posedge clk) disable iff (!rst_n) wr_start |-> !wr_busy);

endmodule

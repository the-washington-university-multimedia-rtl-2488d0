// audio_rate_adapt: receive side of the audio channel (playback and clock
// drift compensation).
//
// The remote transmitter's sample clock differs slightly from the local one,
// so the receive FIFO slowly fills or drains.  Instead of letting it wrap,
// which would click, one sample (pair) per cell is duplicated or deleted,
// depending on the FIFO flags sampled at the start of each cell:
//   - between one quarter and three quarters full: samples pass unchanged;
//   - below one quarter (lt_quarter): the last sample of the cell is played
//     twice, so the FIFO gains one sample per cell;
//   - above three quarters (gt_3quarter): the first sample of the cell is
//     read and thrown away, so the FIFO loses one sample per cell;
//   - fewer bytes than one sample (empty): zeros are played;
//   - full: the FIFO is cleared and err_full pulses (the error report to the
//     local CPU).
// A cell is PAIRS stereo pairs (4 bytes each, left then right, high byte
// first) or 2*PAIRS mono samples (2 bytes, played on both outputs).
//
// Timing: at each tick one sample is produced; its bytes are popped from the
// FIFO (first-word fall-through) one per clock after the tick, and left/right
// are updated with sample_valid one clock after the last byte.  Ticks must be
// at least 10 clocks apart.  The rules are the document's (done there by the
// DSP); which pair is duplicated and the byte order are this design's.
module audio_rate_adapt #(
  parameter int PAIRS = 12,
  parameter int LW    = 10              // width of the FIFO level input
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_on,
  input  logic          mono,
  input  logic          tick,
  input  logic [LW-1:0] fifo_level,
  input  logic          fifo_full,
  input  logic          fifo_lt_quarter,
  input  logic          fifo_gt_3quarter,
  input  logic [7:0]    fifo_data,
  output logic          fifo_rd,
  output logic          fifo_clear,
  output logic [15:0]   left,
  output logic [15:0]   right,
  output logic          sample_valid,
  output logic          err_full,
  output logic [15:0]   dup_count,
  output logic [15:0]   del_count,
  output logic [15:0]   zero_count
);
  logic [3:0]  bps;            // bytes per sample
  logic [5:0]  spc;            // samples per cell
  logic [5:0]  idx;            // samples of the current cell consumed
  logic        reading;
  logic [3:0]  to_read;
  logic        deleting, dup_mode, rep_pending;
  logic [31:0] acc;
  logic        present;

  assign bps = mono ? 4'd2 : 4'd4;
  assign spc = mono ? 6'(2*PAIRS) : 6'(PAIRS);
  assign fifo_rd = reading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx          <= '0;
      reading      <= 1'b0;
      to_read      <= '0;
      deleting     <= 1'b0;
      dup_mode     <= 1'b0;
      rep_pending  <= 1'b0;
      acc          <= '0;
      left         <= '0;
      right        <= '0;
      sample_valid <= 1'b0;
      fifo_clear   <= 1'b0;
      err_full     <= 1'b0;
      dup_count    <= '0;
      del_count    <= '0;
      zero_count   <= '0;
    end else begin
      sample_valid <= 1'b0;
      fifo_clear   <= 1'b0;
      err_full     <= 1'b0;
      if (reading) begin
        acc     <= {acc[23:0], fifo_data};
        to_read <= to_read - 4'd1;
        if (to_read == 4'd1) begin
          reading <= 1'b0;
          if (6'(idx + (deleting ? 6'd2 : 6'd1)) >= spc) begin
            idx         <= '0;
            rep_pending <= dup_mode;
          end else begin
            idx <= idx + (deleting ? 6'd2 : 6'd1);
          end
        end
      end else if (!present && tick && rx_on) begin
        if (fifo_full) begin
          fifo_clear   <= 1'b1;
          err_full     <= 1'b1;
          left         <= '0;
          right        <= '0;
          sample_valid <= 1'b1;
          idx          <= '0;
          rep_pending  <= 1'b0;
        end else if (rep_pending) begin
          rep_pending  <= 1'b0;
          sample_valid <= 1'b1;               // the last sample again
          dup_count    <= dup_count + 16'd1;
        end else if (fifo_level < LW'(bps)) begin
          left         <= '0;
          right        <= '0;
          sample_valid <= 1'b1;
          zero_count   <= zero_count + 16'd1;
        end else begin
          deleting <= 1'b0;
          to_read  <= bps;
          if (idx == '0) begin
            dup_mode <= fifo_lt_quarter;
            if (fifo_gt_3quarter && fifo_level >= LW'(2*bps)) begin
              deleting  <= 1'b1;
              to_read   <= 2*bps;
              del_count <= del_count + 16'd1;
            end
          end
          reading <= 1'b1;
        end
      end
      if (present) begin
        left         <= mono ? acc[15:0] : acc[31:16];
        right        <= acc[15:0];
        sample_valid <= 1'b1;
      end
    end
  end

  // the clock after the last byte of a sample has been shifted in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) present <= 1'b0;
    else        present <= reading && to_read == 4'd1;
  end
endmodule

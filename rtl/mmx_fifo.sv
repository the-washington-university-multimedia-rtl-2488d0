// mmx_fifo: the FIFO used throughout the MMX (TxFIFO, RxFIFO, YFIFO and the
// FIFOs of the video, audio and image channels).
//
// A synchronous FIFO with first-word fall-through: rd_data always shows the
// oldest word while empty is low, and rd_en removes it.  Besides empty and
// full it has the flags the MMX relies on: a programmable-full flag
// (level >= pfull_thresh; the channels program it to one cell payload, 48
// bytes, to announce a cell to the transmitter) and the quarter /
// three-quarter flags the audio receiver uses for rate adaptation
// (lt_quarter = level < DEPTH/4, gt_3quarter = level > 3*DEPTH/4).  The flag
// set follows the document; depth, fall-through reads and the synchronous
// clear input are this design's choices.  A write to a full FIFO and a read
// of an empty one are ignored.  One clock: write and read in the same cycle
// are allowed.
module mmx_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 512,
  localparam int AW = $clog2(DEPTH),
  localparam int LW = AW + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,        // synchronous reset of the contents
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  input  logic [LW-1:0]    pfull_thresh,
  output logic [LW-1:0]    level,
  output logic             empty,
  output logic             full,
  output logic             pfull,
  output logic             lt_quarter,
  output logic             gt_3quarter
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      level <= level + LW'(do_wr) - LW'(do_rd);
    end
  end

  assign rd_data     = mem[rptr];
  assign empty       = (level == '0);
  assign full        = (level == LW'(DEPTH));
  assign pfull       = (level >= pfull_thresh);
  assign lt_quarter  = (level < LW'(DEPTH/4));
  assign gt_3quarter = (level > LW'((3*DEPTH)/4));

endmodule

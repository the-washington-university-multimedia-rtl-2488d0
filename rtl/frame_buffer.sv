// frame_buffer: the video receiver's frame store, built like field memories.
//
// Two field memories (field one and field two), FIELD_WORDS words of DW bits
// each (Y in the high byte, CbCr in the low byte).  Each memory has a write
// pointer and a read pointer that advance independently, wrap at the end and
// may pass each other any number of times; each pointer can be reset to zero
// on its own.  This is what lets the data-driven decoder (write side) and the
// display encoder with its own clock (read side) run without synchronisation:
// at worst the display shows parts of two frames.  Write side: we writes
// wdata into field wr_field at its write pointer, wr_reset[f] zeroes field
// f's write pointer.  Read side (from the encoder, odd/even field read and
// reset): re[f] reads field f at its read pointer and advances it,
// rd_reset[f] zeroes it; rdata is registered, valid the clock after re.
// The pointer behaviour follows the document; the field size (640 x 240,
// from square-pixel NTSC sampling) and the port encoding are this design's.
//
// Lint: Verilator's SYNCASYNCNET on rst_n stands.  The only synchronous use
// of rst_n is the disable iff of a simulation assertion; all flip-flops
// reset asynchronously.
module frame_buffer #(
  parameter int FIELD_WORDS = 153600,
  parameter int DW          = 16,
  localparam int AW = $clog2(FIELD_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic          wr_field,
  input  logic [DW-1:0] wdata,
  input  logic [1:0]    wr_reset,
  input  logic [1:0]    re,
  input  logic [1:0]    rd_reset,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] fmem0 [FIELD_WORDS];
  logic [DW-1:0] fmem1 [FIELD_WORDS];
  logic [AW-1:0] wptr [2];
  logic [AW-1:0] rptr [2];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(FIELD_WORDS-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (we && !wr_field) fmem0[wptr[0]] <= wdata;
    if (we &&  wr_field) fmem1[wptr[1]] <= wdata;
    if (re[0])      rdata <= fmem0[rptr[0]];
    else if (re[1]) rdata <= fmem1[rptr[1]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr[0] <= '0; wptr[1] <= '0;
      rptr[0] <= '0; rptr[1] <= '0;
    end else begin
      for (int f = 0; f < 2; f++) begin
        if (wr_reset[f])                       wptr[f] <= '0;
        else if (we && (wr_field == 1'(f)))    wptr[f] <= inc(wptr[f]);
        if (rd_reset[f])                       rptr[f] <= '0;
        else if (re[f] && !(f == 1 && re[0]))  rptr[f] <= inc(rptr[f]);
      end
    end
  end

  a_one_field_read: assert property (@(posedge clk) disable iff (!rst_n) !(re[0] && re[1]));
endmodule

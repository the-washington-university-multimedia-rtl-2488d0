// tx_select: the Transmitter Control and Source Select block.
//
// Five FIFOs sit on the TxFIFO Bus: audio, video, image, Y connection and the
// CPU's TxFIFO, in that order of priority (index 0 is served first, as the
// document specifies).  At the start of each cell transmission cycle the
// block samples their programmable-full flags (src_ready) and picks the
// highest-priority source that has a cell ready.  It then sends exactly one
// 53-byte cell from it to the TAXI transmitter, one byte per tx_rdy strobe:
//   - if header insertion is enabled for the source (gen_en), bytes 0..4 come
//     from the Header Generation block (hdr_src/hdr_pos -> hdr_byte) and the
//     48 payload bytes are popped from the source FIFO;
//   - otherwise all 53 bytes are popped from the FIFO (complete cells from
//     the CPU or the host).
// The outgoing byte is registered: tx_valid/tx_data/tx_soc change in the
// clock after the tx_rdy that sent them.  When no source is ready nothing is
// sent.  Counters: cells sent per source, and arbitrations in which more than
// one source was ready (a lower-priority source had to wait).
//
// Lint: Verilator's SYNCASYNCNET on rst_n stands.  The only synchronous use
// of rst_n is the disable iff of a simulation assertion; all flip-flops
// reset asynchronously.
module tx_select
  import mmx_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NSRC-1:0]      src_ready,
  input  logic [NSRC-1:0][7:0] src_data,
  output logic [NSRC-1:0]      src_rd,
  input  logic [NSRC-1:0]      gen_en,
  output logic [2:0]           hdr_src,
  output logic [2:0]           hdr_pos,
  input  logic [7:0]           hdr_byte,
  input  logic                 tx_rdy,
  output logic                 tx_valid,
  output logic                 tx_soc,
  output logic [7:0]           tx_data,
  output logic [NSRC-1:0][15:0] cells_sent,
  output logic [15:0]          contended
);
  logic       busy;
  logic [2:0] cur;
  logic [5:0] pos;
  logic [2:0] pick;
  logic       any_ready;
  logic       from_hdr;

  always_comb begin
    pick      = '0;
    any_ready = 1'b0;
    for (int i = NSRC - 1; i >= 0; i--)
      if (src_ready[i]) begin
        pick      = 3'(i);
        any_ready = 1'b1;
      end
  end

  assign hdr_src  = cur;
  assign hdr_pos  = pos[2:0];
  assign from_hdr = gen_en[cur] && pos <= 6'(HDR_BYTES);

  always_comb begin
    src_rd = '0;
    if (busy && tx_rdy && !from_hdr) src_rd[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cur        <= '0;
      pos        <= '0;
      tx_valid   <= 1'b0;
      tx_soc     <= 1'b0;
      tx_data    <= '0;
      cells_sent <= '0;
      contended  <= '0;
    end else begin
      tx_valid <= 1'b0;
      tx_soc   <= 1'b0;
      if (!busy) begin
        if (any_ready) begin
          busy <= 1'b1;
          cur  <= pick;
          pos  <= '0;
          if ((src_ready & (src_ready - 1'b1)) != '0) contended <= contended + 16'd1;
        end
      end else if (tx_rdy) begin
        tx_valid <= 1'b1;
        tx_soc   <= (pos == 6'd0);
        tx_data  <= from_hdr ? hdr_byte : src_data[cur];
        if (pos == 6'(CELL_BYTES-1)) begin
          busy            <= 1'b0;
          cells_sent[cur] <= cells_sent[cur] + 16'd1;
        end else begin
          pos <= pos + 6'd1;
        end
      end
    end
  end

  // at most one source FIFO is popped per clock
  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) (src_rd & (src_rd - 1'b1)) == '0);
endmodule

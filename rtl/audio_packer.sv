// audio_packer: transmit side of the audio channel.
//
// At every sample tick (while tx_on) the 16-bit samples from the codec are
// latched and written into the transmit FIFO one byte per clock: left high,
// left low, right high, right low for stereo; left high, left low for mono.
// A 48-byte cell payload thus carries twelve stereo sample pairs (or 24 mono
// samples), and the FIFO's programmable-full flag, set to 48, announces a
// cell to the transmitter every twelve samples: 272 us at 44.1 kHz.  The
// payload layout is the document's; the byte order and doing it in logic
// rather than in the DSP are this design's.  A tick arriving before the
// previous sample has been written (ticks closer than 4 clocks) is lost and
// counted in overruns.
module audio_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_on,
  input  logic        mono,
  input  logic        tick,
  input  logic [15:0] left,
  input  logic [15:0] right,
  output logic        wr_en,
  output logic [7:0]  wr_data,
  output logic [15:0] overruns
);
  logic [31:0] sh;
  logic [2:0]  left_bytes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh         <= '0;
      left_bytes <= '0;
      wr_en      <= 1'b0;
      wr_data    <= '0;
      overruns   <= '0;
    end else begin
      wr_en <= 1'b0;
      if (left_bytes != 3'd0) begin
        wr_en      <= 1'b1;
        wr_data    <= sh[31:24];
        sh         <= sh << 8;
        left_bytes <= left_bytes - 3'd1;
        if (tick && tx_on) overruns <= overruns + 16'd1;
      end else if (tick && tx_on) begin
        sh         <= {left, right};
        left_bytes <= mono ? 3'd2 : 3'd4;
      end
    end
  end
endmodule

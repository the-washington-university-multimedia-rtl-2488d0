// video_tx_control: Tx Control of the video channel.
//
// Follows the vertical sync of the video decoder (DMSD).  While transmission
// is switched on (tx_on, a PBUS bit), every rising edge of vsync starts a new
// field: the block asks the Tag Stuffing block for a start-of-field tag
// (sof_req, one clock) naming field one or two, alternately, beginning with
// field one after tx_on is raised.  coder_en is high from the first field
// start until tx_on falls and gates the writes of the JPEG coder into its
// FIFO, so only whole fields are sent.  fields counts the field starts.
// That Tx Control runs the transmit side from the H/V syncs is from the
// document; the alternation rule and the gating are this design's.
module video_tx_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_on,
  input  logic        vsync,
  output logic        sof_req,
  output logic        sof_field,
  output logic        coder_en,
  output logic [15:0] fields
);
  logic vs_q, next_field;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_q       <= 1'b0;
      next_field <= 1'b0;
      sof_req    <= 1'b0;
      sof_field  <= 1'b0;
      coder_en   <= 1'b0;
      fields     <= '0;
    end else begin
      vs_q    <= vsync;
      sof_req <= 1'b0;
      if (!tx_on) begin
        coder_en   <= 1'b0;
        next_field <= 1'b0;
      end else if (vsync && !vs_q) begin
        sof_req    <= 1'b1;
        sof_field  <= next_field;
        next_field <= !next_field;
        coder_en   <= 1'b1;
        fields     <= fields + 16'd1;
      end
    end
  end
endmodule

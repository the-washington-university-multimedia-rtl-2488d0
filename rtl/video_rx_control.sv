// video_rx_control: Rx Control of the video channel.
//
// The receive side is data-driven: the JPEG decoder runs only while received
// data is waiting (engine_en = rx_on and the receive FIFO not empty), which
// replaces the gated clock of the original with a clock enable.  The tags
// reported by Tag Stripping steer the frame buffer: a start-of-field-one tag
// selects field memory 0 and resets its write pointer, a start-of-field-two
// tag does the same for field memory 1 (fb_wr_reset, one clock), and
// fb_wr_allow opens decoder writes from the first start-of-field on.  An
// end-of-field tag counts a completed field.  Outputs are registered.
module video_rx_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_on,
  input  logic        data_avail,
  input  logic        sof1,
  input  logic        sof2,
  input  logic        eof,
  output logic        engine_en,
  output logic [1:0]  fb_wr_reset,
  output logic        fb_wr_field,
  output logic        fb_wr_allow,
  output logic [15:0] fields_started,
  output logic [15:0] fields_done
);
  assign engine_en = rx_on && data_avail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_wr_reset    <= '0;
      fb_wr_field    <= 1'b0;
      fb_wr_allow    <= 1'b0;
      fields_started <= '0;
      fields_done    <= '0;
    end else begin
      fb_wr_reset <= '0;
      if (!rx_on) fb_wr_allow <= 1'b0;
      if (sof1 || sof2) begin
        fb_wr_field    <= sof2;
        fb_wr_reset    <= sof2 ? 2'b10 : 2'b01;
        fb_wr_allow    <= rx_on;
        fields_started <= fields_started + 16'd1;
      end
      if (eof) fields_done <= fields_done + 16'd1;
    end
  end
endmodule

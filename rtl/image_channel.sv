// image_channel: the high-speed radiographic image channel.
//
// Image bytes routed to this channel arrive from the RxFIFO Bus (ATM header
// and HEC already removed by the Receiver Control) and are buffered in a
// FIFO of DEPTH bytes.  The Control watches the FIFO's empty flag: in every
// clock where data is waiting and the display's TAXI transmitter takes a byte
// (taxi_rdy, the 40 Mb/s byte slot), it pops one byte and strobes it into the
// transmitter (taxi_strb, taxi_data, registered).  The structure is the
// document's; the FIFO depth is this design's.  overflow counts bytes lost to
// a full FIFO.
module image_channel
#(
  parameter int DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [7:0]  wr_data,
  input  logic        taxi_rdy,
  output logic        taxi_strb,
  output logic [7:0]  taxi_data,
  output logic        empty,
  output logic [15:0] overflow,
  output logic [31:0] bytes_sent
);
  localparam int LW = $clog2(DEPTH) + 1;
  logic          full, rd;
  logic [7:0]    head;

  mmx_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(1'b0),
    .wr_en, .wr_data, .rd_en(rd), .rd_data(head),
    .pfull_thresh(LW'(DEPTH)), .level(), .empty, .full,
    .pfull(), .lt_quarter(), .gt_3quarter()
  );

  assign rd = taxi_rdy && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taxi_strb  <= 1'b0;
      taxi_data  <= '0;
      overflow   <= '0;
      bytes_sent <= '0;
    end else begin
      taxi_strb <= rd;
      if (rd) begin
        taxi_data  <= head;
        bytes_sent <= bytes_sent + 32'd1;
      end
      if (wr_en && full) overflow <= overflow + 16'd1;
    end
  end
endmodule

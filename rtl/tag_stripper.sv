// tag_stripper: the video channel's Tag Stripping block.
//
// Reads the received video byte stream from the FIFO on the RxFIFO Bus
// (first-word fall-through), removes the start-of-field-one, start-of-field-
// two and end-of-field tags (FF D0, FF D1, FF D9, this design's codes, see
// tag_stuffer), reports each as a one-clock pulse to the Rx Control, and packs
// the remaining bytes, high byte first, into 16-bit words for the JPEG
// decoder.  An 0xFF is held back one byte to see whether a tag follows; an FF
// followed by any other byte is data.  A tag discards a dangling half word, so
// each field starts word-aligned.
//
// A byte is read in every clock where the FIFO is not empty and out_ready is
// high; out_valid/out_word and the tag pulses are registered one-clock
// strobes, so the consumer must take a word in the clock it appears.
module tag_stripper
  import mmx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_empty,
  input  logic [7:0]  in_data,
  output logic        in_rd,
  input  logic        out_ready,
  output logic        out_valid,
  output logic [15:0] out_word,
  output logic        sof1,
  output logic        sof2,
  output logic        eof
);
  logic       ff_held;
  logic       half_valid;
  logic [7:0] half;

  assign in_rd = !in_empty && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_held    <= 1'b0;
      half_valid <= 1'b0;
      half       <= '0;
      out_valid  <= 1'b0;
      out_word   <= '0;
      sof1       <= 1'b0;
      sof2       <= 1'b0;
      eof        <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sof1      <= 1'b0;
      sof2      <= 1'b0;
      eof       <= 1'b0;
      if (in_rd) begin
        if (ff_held) begin
          ff_held <= 1'b0;
          if (in_data == TAG_SOF1 || in_data == TAG_SOF2 || in_data == TAG_EOF) begin
            sof1       <= (in_data == TAG_SOF1);
            sof2       <= (in_data == TAG_SOF2);
            eof        <= (in_data == TAG_EOF);
            half_valid <= 1'b0;
          end else if (half_valid) begin
            out_valid <= 1'b1;
            out_word  <= {half, 8'hFF};
            half      <= in_data;
          end else begin
            out_valid <= 1'b1;
            out_word  <= {8'hFF, in_data};
          end
        end else if (in_data == 8'hFF) begin
          ff_held <= 1'b1;
        end else if (half_valid) begin
          out_valid  <= 1'b1;
          out_word   <= {half, in_data};
          half_valid <= 1'b0;
        end else begin
          half       <= in_data;
          half_valid <= 1'b1;
        end
      end
    end
  end
endmodule

// tag_stuffer: the video channel's Tag Stuffing block.
//
// Input: the FIFO behind the JPEG coder, 16-bit code words plus the coder's
// Last Code (LCODE) bit, read first-word-fall-through.  Output: the byte
// stream for the transmit FIFO on the TxFIFO Bus.  When the Tx Control asks
// for a field start (sof_req, with sof_field 0 = field one, 1 = field two)
// the block sends the start-of-field tag, then every code word high byte
// first, and after the word that carries LCODE the end-of-field tag:
//     FF D0 | FF D1   w0.hi w0.lo  w1.hi w1.lo ...  wn.hi wn.lo   FF D9
// The tags are this design's choice of JPEG marker codes (the document does
// not list them); the coder is expected to have byte-stuffed its own 0xFF
// bytes, as JPEG requires, so the tags cannot occur inside the data.  Words
// that arrive outside a field are dropped and counted.  One byte per clock
// while out_ready is high; out_valid/out_data are registered.
module tag_stuffer
  import mmx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_empty,
  input  logic [15:0] in_word,
  input  logic        in_lcode,
  output logic        in_rd,
  input  logic        sof_req,
  input  logic        sof_field,
  input  logic        out_ready,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic [15:0] words_dropped,
  output logic [15:0] fields_closed
);
  typedef enum logic [2:0] {IDLE, SOF_FF, SOF_CODE, HI, LO, EOF_FF, EOF_CODE} state_e;
  state_e state;
  logic   pend, pend_field, field_q;

  always_comb begin
    in_rd = 1'b0;
    if (state == IDLE && !pend && !in_empty) in_rd = 1'b1;   // outside a field
    if (state == LO && out_ready && !in_empty) in_rd = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= IDLE;
      pend          <= 1'b0;
      pend_field    <= 1'b0;
      field_q       <= 1'b0;
      out_valid     <= 1'b0;
      out_data      <= '0;
      words_dropped <= '0;
      fields_closed <= '0;
    end else begin
      out_valid <= 1'b0;
      if (sof_req) begin
        pend       <= 1'b1;
        pend_field <= sof_field;
      end
      unique case (state)
        IDLE: begin
          if (pend && !sof_req) begin
            pend    <= 1'b0;
            field_q <= pend_field;
            state   <= SOF_FF;
          end else if (!pend && !in_empty) begin
            words_dropped <= words_dropped + 16'd1;
          end
        end
        SOF_FF: if (out_ready) begin
          out_valid <= 1'b1; out_data <= 8'hFF; state <= SOF_CODE;
        end
        SOF_CODE: if (out_ready) begin
          out_valid <= 1'b1; out_data <= field_q ? TAG_SOF2 : TAG_SOF1; state <= HI;
        end
        HI: if (out_ready && !in_empty) begin
          out_valid <= 1'b1; out_data <= in_word[15:8]; state <= LO;
        end
        LO: if (out_ready && !in_empty) begin
          out_valid <= 1'b1; out_data <= in_word[7:0];
          state <= in_lcode ? EOF_FF : HI;
        end
        EOF_FF: if (out_ready) begin
          out_valid <= 1'b1; out_data <= 8'hFF; state <= EOF_CODE;
        end
        EOF_CODE: if (out_ready) begin
          out_valid <= 1'b1; out_data <= TAG_EOF; state <= IDLE;
          fields_closed <= fields_closed + 16'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

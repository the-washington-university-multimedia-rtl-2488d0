// hec_check: header error control check of the ATM receiver.
//
// It watches the byte stream from the TAXI receiver in parallel with the
// Header Buffer.  A CRC-8 (x^8 + x^2 + x + 1) runs over header bytes 0..3;
// when byte 4, the HEC, arrives it is compared with the CRC XOR 0x55.  The
// result (hec_ok) is registered in the same clock as the HEC byte and holds
// until the next cell's HEC, so the Receiver Control can use it while the
// rest of the cell streams past.  hec_done pulses for one cycle with each new
// result.  The check itself is what the document asks of its HEC circuit;
// the ATM code is taken from the ATM standard.
module hec_check
  import mmx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_soc,     // first byte of a cell
  input  logic [7:0] in_data,
  output logic       hec_ok,
  output logic       hec_done
);
  logic [7:0] crc;
  logic [2:0] pos;               // header byte number, 5 = past the header

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc      <= '0;
      pos      <= 3'd5;
      hec_ok   <= 1'b0;
      hec_done <= 1'b0;
    end else begin
      hec_done <= 1'b0;
      if (in_valid) begin
        if (in_soc) begin
          crc <= crc8_byte(8'h00, in_data);
          pos <= 3'd1;
        end else if (pos < 3'd4) begin
          crc <= crc8_byte(crc, in_data);
          pos <= pos + 3'd1;
        end else if (pos == 3'd4) begin
          hec_ok   <= (in_data == (crc ^ 8'h55));
          hec_done <= 1'b1;
          pos      <= 3'd5;
        end
      end
    end
  end
endmodule

// header_gen: the Header Generation block of the transmitter.
//
// It keeps one four-byte ATM header per transmit source (audio, video,
// image, Y connection, CPU), written by the local CPU over the PBUS, and a
// per-source enable that tells the Transmitter Control whether to insert
// that header in front of 48 payload bytes from the source.  Header byte
// positions 0..3 read the stored header; position 4 returns its HEC, computed
// here with the ATM CRC-8, so the CPU never has to compute it.
//
// PBUS: PB_HG_BASE + 2*src holds header bits 31:16 (bytes 0,1) and
// PB_HG_BASE + 2*src + 1 bits 15:0 (bytes 2,3); PB_HG_ENABLE bits 4:0 are the
// enables.  After reset the headers are zero and insertion is on for the
// three multimedia channels and off for Y and CPU, which normally send
// complete cells, as the document describes.  The map is this design's.
// The read port is combinational.
module header_gen
  import mmx_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  pbus_wr_t        pbus,
  input  logic [2:0]      src,
  input  logic [2:0]      pos,        // 0..3 header, 4 HEC
  output logic [7:0]      hdr_byte,
  output logic [NSRC-1:0] gen_en
);
  logic [31:0] hdr [NSRC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSRC; i++) hdr[i] <= '0;
      gen_en <= NSRC'(5'b00111);
    end else if (pbus.we) begin
      for (int i = 0; i < NSRC; i++) begin
        if (pbus.addr == PB_HG_BASE + 16'(2*i))     hdr[i][31:16] <= pbus.data;
        if (pbus.addr == PB_HG_BASE + 16'(2*i + 1)) hdr[i][15:0]  <= pbus.data;
      end
      if (pbus.addr == PB_HG_ENABLE) gen_en <= pbus.data[NSRC-1:0];
    end
  end

  always_comb begin
    logic [31:0] h;
    h = (int'(src) < NSRC) ? hdr[src] : '0;
    if (pos < 3'd4) hdr_byte = h[8*(3 - int'(pos)) +: 8];
    else            hdr_byte = hec_of(h);
  end
endmodule

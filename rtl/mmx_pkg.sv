// mmx_pkg: types and constants shared by the MMX glue logic.
//
// An ATM cell is 53 bytes: four header bytes, the header error control
// (HEC) byte and a 48-byte payload.  The HEC is the ATM CRC-8
// (x^8 + x^2 + x + 1) over the four header bytes, XORed with 0x55; that
// code is taken from the ATM standard.  The route entry, the transmit
// source numbering (which is also the transmit priority order: audio
// first, CPU last) and the PBUS write bundle are defined here, together
// with the PBUS register map, which is this design's own choice.
package mmx_pkg;

  localparam int CELL_BYTES    = 53;
  localparam int HDR_BYTES     = 4;
  localparam int PAYLOAD_BYTES = 48;

  // Receive destinations (one FIFO select per cell)
  typedef enum logic [2:0] {
    DEST_NONE  = 3'd0,
    DEST_CPU   = 3'd1,
    DEST_VIDEO = 3'd2,
    DEST_AUDIO = 3'd3,
    DEST_IMAGE = 3'd4
  } dest_e;

  // One Route and Function table entry
  typedef struct packed {
    dest_e dest;
    logic  deliver_hdr;      // the four header bytes
    logic  deliver_hec;      // the HEC byte
    logic  deliver_payload;  // the 48 payload bytes
  } route_entry_t;

  // Transmit sources, index = priority (0 is served first)
  localparam int NSRC      = 5;
  localparam int SRC_AUDIO = 0;
  localparam int SRC_VIDEO = 1;
  localparam int SRC_IMAGE = 2;
  localparam int SRC_Y     = 3;
  localparam int SRC_CPU   = 4;

  // A decoded PBUS write as seen on a card
  typedef struct packed {
    logic        we;
    logic [15:0] addr;
    logic [15:0] data;
  } pbus_wr_t;

  // PBUS register map (16-bit word addresses)
  localparam logic [15:0] PB_RT_INDEX   = 16'h0000; // route table index
  localparam logic [15:0] PB_RT_DATA    = 16'h0001; // route entry, index++
  localparam logic [15:0] PB_HG_BASE    = 16'h1000; // header table: +2*src+half
  localparam logic [15:0] PB_HG_ENABLE  = 16'h1010; // header insertion per source
  localparam logic [15:0] PB_RX_CTRL    = 16'h2000; // bit0 drop cells with bad HEC
  localparam logic [15:0] PB_RXF_THR    = 16'h2001; // CPU RxFIFO programmable full
  localparam logic [15:0] PB_TXF_THR    = 16'h2002; // CPU TxFIFO programmable full
  localparam logic [15:0] PB_YF_THR     = 16'h2003; // YFIFO programmable full
  localparam logic [15:0] PB_VID_CTRL   = 16'h4000; // bit0 tx on, bit1 rx on
  localparam logic [15:0] PB_VID_THR    = 16'h4001; // video tx FIFO programmable full
  localparam logic [15:0] PB_AUD_CTRL   = 16'h5000; // bit0 tx, bit1 rx, bit2 mono, [5:3] rate,
                                                      // bit7 clear error, bit8 loopback, bit9 mix
  localparam logic [15:0] PB_AUD_THR    = 16'h5001; // audio tx FIFO programmable full
  localparam logic [15:0] PB_AUD_VOL    = 16'h5002; // [7:0] left, [15:8] right volume, 128 = unity
  localparam logic [15:0] PB_AUD_MEM    = 16'h5400; // two-port memory, 1K bytes

  // Field tags inserted by the video transmitter (second byte after 0xFF)
  localparam logic [7:0] TAG_SOF1 = 8'hD0;
  localparam logic [7:0] TAG_SOF2 = 8'hD1;
  localparam logic [7:0] TAG_EOF  = 8'hD9;

  // One step of the HEC CRC-8 over a byte, MSB first
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] c;
    c = crc ^ d;
    for (int i = 0; i < 8; i++)
      c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

  // HEC byte for a 4-byte header (byte 0 in bits 31:24)
  function automatic logic [7:0] hec_of(input logic [31:0] hdr);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 3; i >= 0; i--)
      c = crc8_byte(c, hdr[8*i +: 8]);
    return c ^ 8'h55;
  endfunction

endpackage

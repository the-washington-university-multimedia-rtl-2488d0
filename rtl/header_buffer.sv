// header_buffer: the receiver's Header Buffer.
//
// Received bytes are clocked into a five-stage byte-wide shift register (the
// four header bytes plus the HEC byte).  When header byte 3 arrives, the
// VPI/VCI bits that index the Route and Function table are captured in
// route_idx (IDX_W = 15 bits, the width printed for this bus: VPI[2:0] and
// VCI[11:0] by default; which bits are used is this design's choice).  The
// table has a full cell time to answer: byte 0 of a cell leaves the buffer
// only when payload byte 0 enters, five bytes later.  Each byte carries its
// position in the cell (out_pos, 0..52) so the Receiver Control can tell
// header, HEC and payload apart.
//
// Timing: the register shifts on every in_valid.  The bytes of a cell must
// arrive on consecutive in_valid strobes, though not necessarily in
// consecutive clocks.  After the last byte of a cell the buffer drains by
// itself on idle clocks, so a cell is not held back waiting for the next one.
//
// Lint: the VPI and VCI fields are decoded whole; the bits above the index
// (VPI[7:3], VCI[15:12] at the defaults) are reported unused and stay so that
// IDX_W and VPI_IDX can move the index without rewriting the decode.
module header_buffer
  import mmx_pkg::*;
#(
  parameter int IDX_W   = 15,
  parameter int VPI_IDX = 3            // VPI bits in the index, the rest is VCI
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_soc,
  input  logic [7:0]       in_data,
  output logic [IDX_W-1:0] route_idx,
  output logic             idx_valid,  // pulse: route_idx was just updated
  output logic             out_valid,
  output logic             out_soc,
  output logic [5:0]       out_pos,
  output logic [7:0]       out_data
);
  localparam int NSTG = HDR_BYTES + 1;

  typedef struct packed {
    logic       valid;
    logic [5:0] pos;
    logic [7:0] data;
  } stage_t;

  stage_t     stg [NSTG];
  logic [5:0] rcv_cnt;                 // bytes of the current cell seen, 0 = between cells
  logic [5:0] in_pos;
  logic       any_held, shift;
  logic [7:0] vpi;
  logic [15:0] vci;

  assign in_pos = in_soc ? 6'd0 : rcv_cnt;

  always_comb begin
    any_held = 1'b0;
    for (int i = 0; i < NSTG; i++) any_held |= stg[i].valid;
  end
  assign shift = in_valid || (any_held && rcv_cnt == 6'd0);

  // header byte 3 is on in_data, bytes 2, 1, 0 in stages 0, 1, 2
  assign vpi = {stg[2].data[3:0], stg[1].data[7:4]};
  assign vci = {stg[1].data[3:0], stg[0].data, in_data[7:4]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSTG; i++) stg[i] <= '0;
      rcv_cnt   <= '0;
      route_idx <= '0;
      idx_valid <= 1'b0;
      out_valid <= 1'b0;
      out_soc   <= 1'b0;
      out_pos   <= '0;
      out_data  <= '0;
    end else begin
      idx_valid <= 1'b0;
      if (in_valid) begin
        rcv_cnt <= (in_pos == 6'(CELL_BYTES-1)) ? 6'd0 : in_pos + 6'd1;
        if (in_pos == 6'(HDR_BYTES-1)) begin
          route_idx <= IDX_W'({vpi[VPI_IDX-1:0], vci[IDX_W-VPI_IDX-1:0]});
          idx_valid <= 1'b1;
        end
      end
      if (shift) begin
        stg[0] <= '{valid: in_valid, pos: in_pos, data: in_data};
        for (int i = 1; i < NSTG; i++) stg[i] <= stg[i-1];
        out_valid <= stg[NSTG-1].valid;
        out_soc   <= stg[NSTG-1].valid && stg[NSTG-1].pos == 6'd0;
        out_pos   <= stg[NSTG-1].pos;
        out_data  <= stg[NSTG-1].data;
      end else begin
        out_valid <= 1'b0;
        out_soc   <= 1'b0;
      end
    end
  end
endmodule

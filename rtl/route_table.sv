// route_table: the Route and Function look-up table.
//
// 2**IDX_W entries (32768 by default, one per 15-bit VPI/VCI index).  Each
// entry names the destination FIFO of a cell (CPU RxFIFO, video, audio,
// image or none) and which parts of the cell reach it: header, HEC byte,
// payload.  The local CPU fills the table over the PBUS: a write to
// PB_RT_INDEX sets the index, each write to PB_RT_DATA stores an entry
// (bits 5:0 as route_entry_t) and advances the index.  The register
// interface is this design's choice.
//
// After reset the table is swept to "no destination", one entry per clock
// (init_busy is high for 2**IDX_W clocks); PBUS writes during the sweep are
// lost.  The read port is synchronous: rd_entry shows the entry at rd_idx
// one clock after.
module route_table
  import mmx_pkg::*;
#(
  parameter int IDX_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pbus_wr_t         pbus,
  input  logic [IDX_W-1:0] rd_idx,
  output route_entry_t     rd_entry,
  output logic             init_busy
);
  route_entry_t     mem [2**IDX_W];
  logic [IDX_W-1:0] wr_idx;
  logic [IDX_W-1:0] init_idx;
  logic             we;
  logic [IDX_W-1:0] waddr;
  route_entry_t     wdata;

  always_comb begin
    we    = 1'b0;
    waddr = wr_idx;
    wdata = route_entry_t'(pbus.data[5:0]);
    if (init_busy) begin
      we    = 1'b1;
      waddr = init_idx;
      wdata = '{dest: DEST_NONE, default: 1'b0};
    end else if (pbus.we && pbus.addr == PB_RT_DATA) begin
      we = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rd_entry <= mem[rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
      wr_idx    <= '0;
    end else begin
      if (init_busy) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == '1) init_busy <= 1'b0;
      end else if (pbus.we && pbus.addr == PB_RT_INDEX) begin
        wr_idx <= pbus.data[IDX_W-1:0];
      end else if (pbus.we && pbus.addr == PB_RT_DATA) begin
        wr_idx <= wr_idx + 1'b1;
      end
    end
  end
endmodule

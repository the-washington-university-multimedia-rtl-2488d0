// rx_control: the Receiver Control.
//
// For every byte leaving the Header Buffer it decides whether the byte is
// written into one of the FIFOs on the RxFIFO Bus, and asserts that FIFO's
// select (write strobe) in the same clock as the byte.  The decision for a
// whole cell is taken at its first byte (in_soc) from the Route and Function
// entry and the HEC result, and held for the remaining 52 bytes:
//   - dest picks one FIFO: CPU RxFIFO, video, audio or image (or none);
//   - header bytes 0..3, the HEC byte 4 and payload bytes 5..52 are passed
//     only when the entry's deliver_hdr / deliver_hec / deliver_payload bit
//     is set;
//   - with drop_bad_hec set, a cell whose HEC failed is not delivered and is
//     counted in cells_dropped.
// This is the behaviour the document gives its Receiver Control; the encoding
// of the entry and the counters are this design's.  The block is purely
// combinational on the byte path, with registers only for the held decision
// and the counters.  fifo_sel bit order: 0 CPU, 1 video, 2 audio, 3 image.
module rx_control
  import mmx_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,       // low while the route table initialises
  input  logic         in_valid,
  input  logic         in_soc,
  input  logic [5:0]   in_pos,
  input  route_entry_t entry,
  input  logic         hec_ok,
  input  logic         drop_bad_hec,
  output logic [3:0]   fifo_sel,
  output logic [15:0]  cells_routed,
  output logic [15:0]  cells_dropped
);
  route_entry_t ent_q, ent;
  logic         pass_q, pass;

  assign ent  = in_soc ? entry : ent_q;
  assign pass = in_soc ? (enable && !(drop_bad_hec && !hec_ok)) : pass_q;

  always_comb begin
    logic part_ok;
    fifo_sel = '0;
    if (in_pos < 6'(HDR_BYTES))       part_ok = ent.deliver_hdr;
    else if (in_pos == 6'(HDR_BYTES)) part_ok = ent.deliver_hec;
    else                              part_ok = ent.deliver_payload;
    if (in_valid && pass && part_ok) begin
      unique case (ent.dest)
        DEST_CPU:   fifo_sel[0] = 1'b1;
        DEST_VIDEO: fifo_sel[1] = 1'b1;
        DEST_AUDIO: fifo_sel[2] = 1'b1;
        DEST_IMAGE: fifo_sel[3] = 1'b1;
        default:    ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_q         <= '{dest: DEST_NONE, default: 1'b0};
      pass_q        <= 1'b0;
      cells_routed  <= '0;
      cells_dropped <= '0;
    end else if (in_valid && in_soc) begin
      ent_q  <= entry;
      pass_q <= pass;
      if (enable && drop_bad_hec && !hec_ok)
        cells_dropped <= cells_dropped + 16'd1;
      else if (enable && entry.dest != DEST_NONE)
        cells_routed <= cells_routed + 16'd1;
    end
  end
endmodule

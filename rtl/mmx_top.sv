// mmx_top: the MultiMedia eXplorer glue logic.
//
// The MMX sits between an ATM switch and a host and carries compressed
// video, CD-quality audio and radiographic images as ATM cells without
// touching the host bus.  This top wires together everything in it that is
// logic; the commercial chips (CPU, TAXI link chips, JPEG chip set, video
// decoder and encoder, audio codec and DSP) attach at the ports.
//
// Receive path (ATM network -> channels): bytes from the TAXI receiver
// (net_rx_*) pass through the Header Buffer while the HEC is checked and the
// Route and Function table is looked up with 15 VPI/VCI bits.  The Receiver
// Control then writes the delivered parts of each cell into one FIFO on the
// RxFIFO Bus: the CPU's RxFIFO, the video receive FIFO, the audio receive
// FIFO or the image channel.
//
// Transmit path (channels -> ATM network): the audio and video transmit
// FIFOs, an external image source, the YFIFO (host cells with null cells
// removed) and the CPU's TxFIFO feed the Transmitter Control and Source
// Select, which sends one cell at a time to the TAXI transmitter (net_tx_*)
// in strict priority audio > video > image > Y > CPU, with headers from the
// Header Generation table for the multimedia sources.
//
// Video: coder words (16 bits + LCODE) -> FIFO -> Tag Stuffing -> transmit
// FIFO; receive FIFO -> Tag Stripping -> decoder words; decoded pixels ->
// two-field frame buffer -> encoder (odd/even field read/reset).  Audio:
// sample tick -> packer -> transmit FIFO; receive FIFO -> rate adapter ->
// volume / loopback / mixing -> samples; a 1K x 8 two-port mailbox memory
// to the DSP.  Image: FIFO and
// control to the display's TAXI transmitter.
//
// Control: the CPU writes everything over the PBUS (pbus_master, one decoder
// here for all cards) using the map in mmx_pkg.  Registers reset to: CPU
// RxFIFO/TxFIFO/YFIFO programmable full 53 bytes (one whole cell), video and
// audio transmit FIFOs 48 bytes (one payload), HEC dropping off, channels
// off, audio at 44.1 kHz stereo.  The CPU reads the mailbox memory directly
// through cpu_mem_* (PBUS reads are not modelled).
//
// One clock (clk, 20 MHz assumed for the audio divider) runs everything;
// the rates of the TAXI links, the video clocks and the audio sample clock
// enter as strobes.  This single-clock structure, the FIFO depths and the
// register map are this design's choices; the blocks, buses, priorities and
// FIFO flag uses follow the document.  After reset the route table is
// cleared for 32768 clocks (rt_init_busy); cells received meanwhile are not
// delivered.
//
// Lint: Verilator's SYNCASYNCNET on rst_n stands.  The only synchronous use
// of rst_n is the disable iff of the assertions in tx_select and
// frame_buffer; all flip-flops reset asynchronously.  Outputs of the blocks
// that the top does not need are left open.
module mmx_top
  import mmx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // local CPU: PBUS writes, TxFIFO, RxFIFO, mailbox reads, status
  input  logic        cpu_pb_req,
  input  logic [15:0] cpu_pb_addr,
  input  logic [15:0] cpu_pb_wdata,
  output logic        cpu_pb_busy,
  input  logic        cpu_tx_wr,
  input  logic [7:0]  cpu_tx_data,
  input  logic        cpu_rx_rd,
  output logic [7:0]  cpu_rx_data,
  output logic        cpu_rx_empty,
  output logic        cpu_rx_pfull,
  input  logic        cpu_mem_rd,
  input  logic [9:0]  cpu_mem_addr,
  output logic [7:0]  cpu_mem_rdata,
  output logic        cpu_int,          // mailbox interrupt from the DSP
  output logic        aud_err,          // audio receive FIFO overflowed (sticky)
  output logic        rt_init_busy,
  // ATM network: TAXI receiver and transmitter, byte side
  input  logic        net_rx_valid,
  input  logic        net_rx_soc,
  input  logic [7:0]  net_rx_data,
  input  logic        net_tx_rdy,
  output logic        net_tx_valid,
  output logic        net_tx_soc,
  output logic [7:0]  net_tx_data,
  // "Y" connection: TAXI receiver from the host's ATM card
  input  logic        host_rx_valid,
  input  logic        host_rx_soc,
  input  logic [7:0]  host_rx_data,
  // third transmit source on the TxFIFO Bus (image transmitter, external)
  input  logic        img_src_ready,
  input  logic [7:0]  img_src_data,
  output logic        img_src_rd,
  // video: DMSD sync, JPEG coder output, JPEG decoder in/out, DENC side
  input  logic        vid_vsync,
  output logic        vid_coder_en,
  input  logic        vid_coder_valid,
  input  logic [15:0] vid_coder_word,
  input  logic        vid_coder_lcode,
  output logic        vid_dec_en,
  output logic        vid_dec_valid,
  output logic [15:0] vid_dec_word,
  input  logic        vid_pix_valid,
  input  logic [15:0] vid_pix,          // Y in 15:8, CbCr in 7:0
  input  logic [1:0]  vid_fb_re,        // odd / even field read
  input  logic [1:0]  vid_fb_rd_reset,  // odd / even field read reset
  output logic [15:0] vid_fb_rdata,
  // audio: codec samples, DSP port of the mailbox memory
  output logic        aud_tick,
  input  logic [15:0] aud_left_in,
  input  logic [15:0] aud_right_in,
  output logic [15:0] aud_left_out,
  output logic [15:0] aud_right_out,
  output logic        aud_out_valid,
  input  logic        dsp_en,
  input  logic        dsp_we,
  input  logic [9:0]  dsp_addr,
  input  logic [7:0]  dsp_wdata,
  output logic [7:0]  dsp_rdata,
  output logic        dsp_int,
  // image channel: display TAXI transmitter
  input  logic        img_taxi_rdy,
  output logic        img_taxi_strb,
  output logic [7:0]  img_taxi_data,
  // statistics
  output logic [15:0] rx_cells_routed,
  output logic [15:0] rx_cells_dropped,
  output logic [15:0] y_cells_kept,
  output logic [15:0] y_cells_deleted,
  output logic [NSRC-1:0][15:0] tx_cells_sent,
  output logic [15:0] tx_contended,
  output logic [15:0] vid_fields_sent,
  output logic [15:0] vid_fields_received,
  output logic [15:0] aud_dup_count,
  output logic [15:0] aud_del_count,
  output logic [15:0] aud_zero_count
);
  localparam int CPU_FIFO   = 512;
  localparam int Y_FIFO     = 512;
  localparam int VID_FIFO   = 1024;
  localparam int CODER_FIFO = 512;
  localparam int AUD_FIFO   = 512;
  localparam int IMG_FIFO   = 1024;
  localparam int CLW = $clog2(CPU_FIFO) + 1;     // FIFO level widths
  localparam int YLW = $clog2(Y_FIFO) + 1;
  localparam int VLW = $clog2(VID_FIFO) + 1;
  localparam int KLW = $clog2(CODER_FIFO) + 1;
  localparam int ALW = $clog2(AUD_FIFO) + 1;

  // ---------------------------------------------------------------- PBUS
  logic [15:0] pbus_ad;
  logic        pbus_ale, pbus_wr;
  pbus_wr_t    pb;

  pbus_master u_pbus_master (
    .clk, .rst_n, .req(cpu_pb_req), .addr(cpu_pb_addr), .wdata(cpu_pb_wdata),
    .busy(cpu_pb_busy), .pbus_ad, .pbus_ale, .pbus_wr);
  pbus_slave u_pbus_slave (.clk, .rst_n, .pbus_ad, .pbus_ale, .pbus_wr, .wr(pb));

  logic        drop_bad_hec;
  // programmable-full thresholds, as wide as the level of their FIFO
  logic [CLW-1:0] thr_rx, thr_tx;
  logic [YLW-1:0] thr_y;
  logic [VLW-1:0] thr_vid;
  logic [ALW-1:0] thr_aud;
  logic        vid_tx_on, vid_rx_on;
  logic        aud_tx_on, aud_rx_on, aud_mono, aud_loop, aud_mix;
  logic [7:0]  aud_vol_l, aud_vol_r;
  logic [2:0]  aud_rate;
  logic        aud_err_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_bad_hec <= 1'b0;
      thr_rx  <= CLW'(53);
      thr_tx  <= CLW'(53);
      thr_y   <= YLW'(53);
      thr_vid <= VLW'(48);
      thr_aud <= ALW'(48);
      {vid_rx_on, vid_tx_on} <= 2'b00;
      {aud_rate, aud_mono, aud_rx_on, aud_tx_on} <= '0;
      {aud_mix, aud_loop} <= 2'b00;
      {aud_vol_r, aud_vol_l} <= 16'h8080;
      aud_err <= 1'b0;
    end else begin
      if (aud_err_pulse) aud_err <= 1'b1;
      if (pb.we) begin
        unique case (pb.addr)
          PB_RX_CTRL:  drop_bad_hec <= pb.data[0];
          PB_RXF_THR:  thr_rx  <= CLW'(pb.data);
          PB_TXF_THR:  thr_tx  <= CLW'(pb.data);
          PB_YF_THR:   thr_y   <= YLW'(pb.data);
          PB_VID_CTRL: {vid_rx_on, vid_tx_on} <= pb.data[1:0];
          PB_VID_THR:  thr_vid <= VLW'(pb.data);
          PB_AUD_CTRL: begin
            {aud_rate, aud_mono, aud_rx_on, aud_tx_on} <= pb.data[5:0];
            {aud_mix, aud_loop} <= pb.data[9:8];
            if (pb.data[7]) aud_err <= 1'b0;
          end
          PB_AUD_THR:  thr_aud <= ALW'(pb.data);
          PB_AUD_VOL:  {aud_vol_r, aud_vol_l} <= pb.data;
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------- receive path
  logic [14:0]  route_idx;
  route_entry_t route_entry;
  logic         hec_ok;
  logic         hb_valid, hb_soc;
  logic [5:0]   hb_pos;
  logic [7:0]   hb_data;
  logic [3:0]   fifo_sel;

  hec_check u_hec (
    .clk, .rst_n, .in_valid(net_rx_valid), .in_soc(net_rx_soc), .in_data(net_rx_data),
    .hec_ok, .hec_done());

  header_buffer u_hdr_buf (
    .clk, .rst_n, .in_valid(net_rx_valid), .in_soc(net_rx_soc), .in_data(net_rx_data),
    .route_idx, .idx_valid(), .out_valid(hb_valid), .out_soc(hb_soc), .out_pos(hb_pos),
    .out_data(hb_data));

  route_table u_route (
    .clk, .rst_n, .pbus(pb), .rd_idx(route_idx), .rd_entry(route_entry),
    .init_busy(rt_init_busy));

  rx_control u_rx_ctrl (
    .clk, .rst_n, .enable(!rt_init_busy), .in_valid(hb_valid), .in_soc(hb_soc),
    .in_pos(hb_pos), .entry(route_entry), .hec_ok, .drop_bad_hec, .fifo_sel,
    .cells_routed(rx_cells_routed), .cells_dropped(rx_cells_dropped));

  // CPU RxFIFO
  mmx_fifo #(.WIDTH(8), .DEPTH(CPU_FIFO)) u_rxfifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(fifo_sel[0]), .wr_data(hb_data),
    .rd_en(cpu_rx_rd), .rd_data(cpu_rx_data), .pfull_thresh(thr_rx), .level(),
    .empty(cpu_rx_empty), .full(), .pfull(cpu_rx_pfull), .lt_quarter(), .gt_3quarter());

  // ------------------------------------------------------ transmit path
  logic [NSRC-1:0]      src_ready, src_rd, gen_en;
  logic [NSRC-1:0][7:0] src_data;
  logic [2:0]           hdr_src, hdr_pos;
  logic [7:0]           hdr_byte;

  header_gen u_hdr_gen (
    .clk, .rst_n, .pbus(pb), .src(hdr_src), .pos(hdr_pos), .hdr_byte, .gen_en);

  tx_select u_tx_sel (
    .clk, .rst_n, .src_ready, .src_data, .src_rd, .gen_en, .hdr_src, .hdr_pos, .hdr_byte,
    .tx_rdy(net_tx_rdy), .tx_valid(net_tx_valid), .tx_soc(net_tx_soc), .tx_data(net_tx_data),
    .cells_sent(tx_cells_sent), .contended(tx_contended));

  // CPU TxFIFO
  mmx_fifo #(.WIDTH(8), .DEPTH(CPU_FIFO)) u_txfifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(cpu_tx_wr), .wr_data(cpu_tx_data),
    .rd_en(src_rd[SRC_CPU]), .rd_data(src_data[SRC_CPU]), .pfull_thresh(thr_tx),
    .level(), .empty(), .full(), .pfull(src_ready[SRC_CPU]), .lt_quarter(), .gt_3quarter());

  // "Y" connection
  logic       y_wr;
  logic [7:0] y_data;

  null_cell_delete u_null_del (
    .clk, .rst_n, .in_valid(host_rx_valid), .in_soc(host_rx_soc), .in_data(host_rx_data),
    .wr_en(y_wr), .wr_data(y_data), .cells_kept(y_cells_kept), .cells_deleted(y_cells_deleted));

  mmx_fifo #(.WIDTH(8), .DEPTH(Y_FIFO)) u_yfifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(y_wr), .wr_data(y_data),
    .rd_en(src_rd[SRC_Y]), .rd_data(src_data[SRC_Y]), .pfull_thresh(thr_y),
    .level(), .empty(), .full(), .pfull(src_ready[SRC_Y]), .lt_quarter(), .gt_3quarter());

  // external image source
  assign src_ready[SRC_IMAGE] = img_src_ready;
  assign src_data[SRC_IMAGE]  = img_src_data;
  assign img_src_rd           = src_rd[SRC_IMAGE];

  // ------------------------------------------------------ video channel
  logic        sof_req, sof_field;
  logic        coder_empty, coder_rd, coder_lcode;
  logic [15:0] coder_word;
  logic        st_valid, vtx_full;
  logic [7:0]  st_data;

  video_tx_control u_vid_tx_ctrl (
    .clk, .rst_n, .tx_on(vid_tx_on), .vsync(vid_vsync), .sof_req, .sof_field,
    .coder_en(vid_coder_en), .fields(vid_fields_sent));

  mmx_fifo #(.WIDTH(17), .DEPTH(CODER_FIFO)) u_coder_fifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(vid_coder_valid && vid_coder_en),
    .wr_data({vid_coder_lcode, vid_coder_word}), .rd_en(coder_rd),
    .rd_data({coder_lcode, coder_word}), .pfull_thresh(KLW'(CODER_FIFO)), .level(),
    .empty(coder_empty), .full(), .pfull(), .lt_quarter(), .gt_3quarter());

  tag_stuffer u_tag_stuff (
    .clk, .rst_n, .in_empty(coder_empty), .in_word(coder_word), .in_lcode(coder_lcode),
    .in_rd(coder_rd), .sof_req, .sof_field, .out_ready(!vtx_full), .out_valid(st_valid),
    .out_data(st_data), .words_dropped(), .fields_closed());

  mmx_fifo #(.WIDTH(8), .DEPTH(VID_FIFO)) u_vid_txfifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(st_valid), .wr_data(st_data),
    .rd_en(src_rd[SRC_VIDEO]), .rd_data(src_data[SRC_VIDEO]), .pfull_thresh(thr_vid),
    .level(), .empty(), .full(vtx_full), .pfull(src_ready[SRC_VIDEO]), .lt_quarter(),
    .gt_3quarter());

  logic       vrx_empty, vrx_rd;
  logic [7:0] vrx_data;
  logic       sof1, sof2, eof;
  logic [1:0] fb_wr_reset;
  logic       fb_wr_field, fb_wr_allow;

  mmx_fifo #(.WIDTH(8), .DEPTH(VID_FIFO)) u_vid_rxfifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(fifo_sel[1]), .wr_data(hb_data),
    .rd_en(vrx_rd), .rd_data(vrx_data), .pfull_thresh(VLW'(VID_FIFO)), .level(),
    .empty(vrx_empty), .full(), .pfull(), .lt_quarter(), .gt_3quarter());

  tag_stripper u_tag_strip (
    .clk, .rst_n, .in_empty(vrx_empty), .in_data(vrx_data), .in_rd(vrx_rd),
    .out_ready(vid_rx_on), .out_valid(vid_dec_valid), .out_word(vid_dec_word),
    .sof1, .sof2, .eof);

  video_rx_control u_vid_rx_ctrl (
    .clk, .rst_n, .rx_on(vid_rx_on), .data_avail(!vrx_empty), .sof1, .sof2, .eof,
    .engine_en(vid_dec_en), .fb_wr_reset, .fb_wr_field, .fb_wr_allow,
    .fields_started(vid_fields_received), .fields_done());

  frame_buffer u_frame_buf (
    .clk, .rst_n, .we(vid_pix_valid && fb_wr_allow), .wr_field(fb_wr_field), .wdata(vid_pix),
    .wr_reset(fb_wr_reset), .re(vid_fb_re), .rd_reset(vid_fb_rd_reset), .rdata(vid_fb_rdata));

  // ------------------------------------------------------ audio channel
  logic          pk_wr;
  logic [7:0]    pk_data;
  logic          arx_rd, arx_clear, arx_full, arx_ltq, arx_gt3q;
  logic [7:0]    arx_data;
  logic [ALW-1:0] arx_level;
  logic           ad_valid;
  logic [15:0]    ad_left, ad_right;

  audio_rate_gen u_aud_rate (
    .clk, .rst_n, .enable(aud_tx_on || aud_rx_on), .rate_sel(aud_rate), .tick(aud_tick));

  audio_packer u_aud_pack (
    .clk, .rst_n, .tx_on(aud_tx_on), .mono(aud_mono), .tick(aud_tick),
    .left(aud_left_in), .right(aud_right_in), .wr_en(pk_wr), .wr_data(pk_data), .overruns());

  mmx_fifo #(.WIDTH(8), .DEPTH(AUD_FIFO)) u_aud_txfifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(pk_wr), .wr_data(pk_data),
    .rd_en(src_rd[SRC_AUDIO]), .rd_data(src_data[SRC_AUDIO]), .pfull_thresh(thr_aud),
    .level(), .empty(), .full(), .pfull(src_ready[SRC_AUDIO]), .lt_quarter(), .gt_3quarter());

  // After the rate adapter clears the receive FIFO on overflow, the rest of
  // the cell being delivered is discarded so the FIFO restarts on a sample
  // pair boundary.
  logic arx_skip;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                arx_skip <= 1'b0;
    else if (arx_clear)        arx_skip <= 1'b1;
    else if (hb_valid && hb_soc) arx_skip <= 1'b0;
  end

  mmx_fifo #(.WIDTH(8), .DEPTH(AUD_FIFO)) u_aud_rxfifo (
    .clk, .rst_n, .clear(arx_clear), .wr_en(fifo_sel[2] && !arx_skip), .wr_data(hb_data),
    .rd_en(arx_rd), .rd_data(arx_data), .pfull_thresh(ALW'(AUD_FIFO)), .level(arx_level),
    .empty(), .full(arx_full), .pfull(), .lt_quarter(arx_ltq), .gt_3quarter(arx_gt3q));

  audio_rate_adapt #(.PAIRS(12), .LW(ALW)) u_aud_adapt (
    .clk, .rst_n, .rx_on(aud_rx_on), .mono(aud_mono), .tick(aud_tick),
    .fifo_level(arx_level), .fifo_full(arx_full), .fifo_lt_quarter(arx_ltq),
    .fifo_gt_3quarter(arx_gt3q), .fifo_data(arx_data), .fifo_rd(arx_rd),
    .fifo_clear(arx_clear), .left(ad_left), .right(ad_right),
    .sample_valid(ad_valid), .err_full(aud_err_pulse), .dup_count(aud_dup_count),
    .del_count(aud_del_count), .zero_count(aud_zero_count));

  audio_mixer u_aud_mix (
    .clk, .rst_n, .tick(aud_tick), .loc_left(aud_left_in), .loc_right(aud_right_in),
    .in_valid(ad_valid), .rx_left(ad_left), .rx_right(ad_right),
    .loopback(aud_loop), .mix(aud_mix), .vol_left(aud_vol_l), .vol_right(aud_vol_r),
    .out_valid(aud_out_valid), .out_left(aud_left_out), .out_right(aud_right_out));

  logic a_wr_hit;
  assign a_wr_hit = pb.we && (pb.addr & 16'hFC00) == PB_AUD_MEM;

  two_port_mem #(.DEPTH(1024)) u_mailbox (
    .clk, .rst_n,
    .a_en(a_wr_hit || cpu_mem_rd), .a_we(a_wr_hit),
    .a_addr(a_wr_hit ? pb.addr[9:0] : cpu_mem_addr), .a_wdata(pb.data[7:0]),
    .a_rdata(cpu_mem_rdata),
    .b_en(dsp_en), .b_we(dsp_we), .b_addr(dsp_addr), .b_wdata(dsp_wdata), .b_rdata(dsp_rdata),
    .int_a(cpu_int), .int_b(dsp_int));

  // ------------------------------------------------------ image channel
  image_channel #(.DEPTH(IMG_FIFO)) u_image (
    .clk, .rst_n, .wr_en(fifo_sel[3]), .wr_data(hb_data), .taxi_rdy(img_taxi_rdy),
    .taxi_strb(img_taxi_strb), .taxi_data(img_taxi_data), .empty(), .overflow(),
    .bytes_sent());

endmodule

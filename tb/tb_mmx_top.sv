// tb_mmx_top: end-to-end test of the MMX glue logic at its default sizes.
//
// The ATM transmitter is looped back into the ATM receiver, so every cell the
// MMX sends comes back through the Header Buffer, HEC check, route table and
// Receiver Control.  The line runs at one byte every other clock, and at
// one byte per clock (the full 20 MB/s) while a burst of CPU and audio cells
// passes.  Stand-ins for the external chips:
//   - CPU: programs the route table, headers and channel controls over the
//     PBUS, writes complete cells into the TxFIFO (some with a bad HEC, some to
//     an unrouted VCI, bursts of audio cells) and reads the RxFIFO;
//   - host ATM card: a Y stream mixing real cells with null cells;
//   - video coder: fields of 94 code words on each vertical sync; decoder: the
//     identity (each received word is written back as a pixel); encoder: reads
//     both fields of the frame buffer at the end;
//   - audio codec: numbered sample pairs at every sample tick;
//   - image display transmitter: takes a byte every fourth clock;
//   - external image source: one 48-byte payload on the third TxFIFO source;
//   - DSP: exchanges mailbox messages with the CPU.
// At the end the audio output is played at half volume, then looped back
// from the local input, then mixed with it, each checked sample by sample.
// Checks: every byte delivered is what was sent, in order where the design
// keeps order; and each mechanism occurred at least once: routing to all four
// FIFOs, unrouted cells ignored, HEC drop, null-cell deletion, contention in
// the transmit arbitration, generated headers, field tags both ways, frame
// buffer writes and reads, audio duplication, deletion, zero fill,
// overflow, volume, loopback and mixing, both mailbox interrupts, and cells
// back to back at the full byte rate.
//
// Timing: inputs change and outputs are sampled at the falling clock edge.
// The run is about 240,000 clocks at the design's default sizes.
module tb_mmx_top;
  import mmx_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;        // 20 MHz

  // ---------------------------------------------------------------- DUT
  logic        cpu_pb_req = 0, cpu_pb_busy;
  logic [15:0] cpu_pb_addr = 0, cpu_pb_wdata = 0;
  logic        cpu_tx_wr = 0;
  logic [7:0]  cpu_tx_data = 0;
  logic        cpu_rx_rd = 0, cpu_rx_empty, cpu_rx_pfull;
  logic [7:0]  cpu_rx_data;
  logic        cpu_mem_rd = 0;
  logic [9:0]  cpu_mem_addr = 0;
  logic [7:0]  cpu_mem_rdata;
  logic        cpu_int, aud_err, rt_init_busy;
  logic        net_tx_rdy = 0, net_tx_valid, net_tx_soc;
  logic [7:0]  net_tx_data;
  logic        host_rx_valid = 0, host_rx_soc = 0;
  logic [7:0]  host_rx_data = 0;
  logic        img_src_ready = 0, img_src_rd;
  logic [7:0]  img_src_data = 0;
  logic        vid_vsync = 0, vid_coder_en, vid_coder_valid = 0, vid_coder_lcode = 0;
  logic [15:0] vid_coder_word = 0;
  logic        vid_dec_en, vid_dec_valid;
  logic [15:0] vid_dec_word;
  logic        vid_pix_valid = 0;
  logic [15:0] vid_pix = 0;
  logic [1:0]  vid_fb_re = 0, vid_fb_rd_reset = 0;
  logic [15:0] vid_fb_rdata;
  logic        aud_tick, aud_out_valid;
  logic [15:0] aud_left_in = 0, aud_right_in = 0, aud_left_out, aud_right_out;
  logic        dsp_en = 0, dsp_we = 0, dsp_int;
  logic [9:0]  dsp_addr = 0;
  logic [7:0]  dsp_wdata = 0, dsp_rdata;
  logic        img_taxi_rdy = 0, img_taxi_strb;
  logic [7:0]  img_taxi_data;
  logic [15:0] rx_cells_routed, rx_cells_dropped, y_cells_kept, y_cells_deleted;
  logic [NSRC-1:0][15:0] tx_cells_sent;
  logic [15:0] tx_contended, vid_fields_sent, vid_fields_received;
  logic [15:0] aud_dup_count, aud_del_count, aud_zero_count;

  mmx_top dut (
    .clk, .rst_n,
    .cpu_pb_req, .cpu_pb_addr, .cpu_pb_wdata, .cpu_pb_busy,
    .cpu_tx_wr, .cpu_tx_data, .cpu_rx_rd, .cpu_rx_data, .cpu_rx_empty, .cpu_rx_pfull,
    .cpu_mem_rd, .cpu_mem_addr, .cpu_mem_rdata, .cpu_int, .aud_err, .rt_init_busy,
    .net_rx_valid(net_tx_valid), .net_rx_soc(net_tx_soc), .net_rx_data(net_tx_data),
    .net_tx_rdy, .net_tx_valid, .net_tx_soc, .net_tx_data,
    .host_rx_valid, .host_rx_soc, .host_rx_data,
    .img_src_ready, .img_src_data, .img_src_rd,
    .vid_vsync, .vid_coder_en, .vid_coder_valid, .vid_coder_word, .vid_coder_lcode,
    .vid_dec_en, .vid_dec_valid, .vid_dec_word, .vid_pix_valid, .vid_pix,
    .vid_fb_re, .vid_fb_rd_reset, .vid_fb_rdata,
    .aud_tick, .aud_left_in, .aud_right_in, .aud_left_out, .aud_right_out, .aud_out_valid,
    .dsp_en, .dsp_we, .dsp_addr, .dsp_wdata, .dsp_rdata, .dsp_int,
    .img_taxi_rdy, .img_taxi_strb, .img_taxi_data,
    .rx_cells_routed, .rx_cells_dropped, .y_cells_kept, .y_cells_deleted,
    .tx_cells_sent, .tx_contended, .vid_fields_sent, .vid_fields_received,
    .aud_dup_count, .aud_del_count, .aud_zero_count);

  // ------------------------------------------------------------ helpers
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  // header for VPI 0 and a VCI
  function automatic logic [31:0] hdr_of(input int vci);
    return {12'h000, 16'(vci), 4'h0};
  endfunction

  localparam int VCI_CPU = 100, VCI_VIDEO = 200, VCI_AUDIO = 300, VCI_IMAGE = 400;
  localparam int VCI_NONE = 500, VCI_HOST = 600;

  task automatic pbw(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    while (cpu_pb_busy) @(negedge clk);
    cpu_pb_req = 1; cpu_pb_addr = a; cpu_pb_wdata = d;
    @(negedge clk);
    cpu_pb_req = 0;
    while (cpu_pb_busy) @(negedge clk);
  endtask

  task automatic route(input int vci, input dest_e d, input bit h, input bit e, input bit p);
    pbw(PB_RT_INDEX, 16'(vci & 16'h0FFF));     // VPI 0: index = VCI[11:0]
    pbw(PB_RT_DATA, 16'({d, h, e, p}));
  endtask

  // ----------------------------------------------------- mechanism counters
  int n_cpu_cells = 0, n_img_bytes = 0, n_vid_words = 0, n_sof1 = 0, n_sof2 = 0;
  int n_fb_reads = 0, n_aud_real = 0, n_aud_zero = 0, n_aud_injected = 0;
  int n_dsp_int = 0, n_cpu_int = 0;

  // ------------------------------------------------ network line and TAXIs
  int cyc = 0;
  bit line_fast = 0;                     // a byte in every clock (20 MB/s)
  int n_fast_cells = 0;
  int n_aud_skipped = 0;                 // bytes discarded after an overflow clear
  always @(negedge clk) if (dut.arx_skip && dut.fifo_sel[2]) n_aud_skipped++;
  always @(negedge clk) begin
    cyc++;
    net_tx_rdy   = (cyc % 2 == 0) || line_fast;   // 10 MB/s line slots, or every clock
    if (line_fast && net_tx_valid && net_tx_soc) n_fast_cells++;
    img_taxi_rdy = (cyc % 4 == 0);       // 40 Mb/s display link
  end

  // --------------------------------------------------- expected CPU cells
  logic [7:0] exp_cells [int][$];
  logic [7:0] img_exp[$];                // payload bytes due at the display        // keyed by the id in payload bytes 5..8
  int cpu_ids = 0;

  task automatic cpu_send(input logic [31:0] h, input bit bad_hec, input int kind,
                          input bit expect_back);
    logic [7:0] c[$];
    int id;
    id = 32'h4000_0000 + cpu_ids++;
    for (int i = 0; i < 4; i++) c.push_back(h[8*(3-i) +: 8]);
    c.push_back(ref_hec(h) ^ (bad_hec ? 8'h01 : 8'h00));
    for (int i = 0; i < 48; i++) begin
      if (kind == 1) c.push_back((i % 4 == 0) ? 8'hA5 : (i % 4 == 1) ? 8'h00 : 8'h0F); // audio filler
      else if (i < 4) c.push_back(8'(id >> (8*(3-i))));
      else c.push_back(8'($urandom));
    end
    if (expect_back) exp_cells[id] = c;
    if (h == hdr_of(VCI_IMAGE)) for (int i = 5; i < 53; i++) img_exp.push_back(c[i]);
    foreach (c[i]) begin
      @(negedge clk); cpu_tx_wr = 1; cpu_tx_data = c[i];
    end
    @(negedge clk); cpu_tx_wr = 0;
  endtask

  // RxFIFO reader
  logic [7:0] rxc[$];
  always @(negedge clk) if (rst_n) begin
    cpu_rx_rd = !cpu_rx_empty && !cpu_rx_rd;
    if (cpu_rx_rd) begin
      rxc.push_back(cpu_rx_data);
      if (rxc.size() == 53) begin
        int id;
        id = {rxc[5], rxc[6], rxc[7], rxc[8]};
        chk(exp_cells.exists(id), $sformatf("cell %h arrived at the CPU unexpectedly", id));
        if (exp_cells.exists(id)) begin
          chk(rxc == exp_cells[id], $sformatf("cell %h contents", id));
          exp_cells.delete(id);
        end
        n_cpu_cells++;
        rxc.delete();
      end
    end
  end

  // ------------------------------------------------------------ image
  always @(negedge clk) if (rst_n && img_taxi_strb) begin
    chk(img_exp.size() > 0 && img_taxi_data == img_exp[0], "image byte");
    if (img_exp.size() > 0) void'(img_exp.pop_front());
    n_img_bytes++;
  end

  // external image source on the TxFIFO Bus: one payload, header to the CPU
  logic [7:0] isrc[$];
  logic isrc_rd_q = 0;
  always @(posedge clk) isrc_rd_q <= img_src_rd;
  always @(negedge clk) begin
    if (isrc_rd_q) void'(isrc.pop_front());
    img_src_ready = isrc.size() >= 48;
    img_src_data  = isrc.size() > 0 ? isrc[0] : 8'h00;
  end

  // ------------------------------------------------------------ host Y
  task automatic host_cell(input logic [31:0] h, input bit expect_back);
    logic [7:0] c[$];
    int id;
    id = 32'h6000_0000 + cpu_ids++;
    for (int i = 0; i < 4; i++) c.push_back(h[8*(3-i) +: 8]);
    c.push_back(ref_hec(h));
    for (int i = 0; i < 48; i++) c.push_back(i < 4 ? 8'(id >> (8*(3-i))) : 8'($urandom));
    if (expect_back) exp_cells[id] = c;
    foreach (c[i]) begin
      @(negedge clk); host_rx_valid = 1; host_rx_soc = (i == 0); host_rx_data = c[i];
      @(negedge clk); host_rx_valid = 0;
    end
  endtask

  // ------------------------------------------------------------ video
  localparam int NWORDS = 94;            // 2 + 2*94 + 2 = 192 bytes = 4 cells per field
  logic [15:0] vid_exp[$];
  logic [15:0] field_words[2][$];
  logic [15:0] cur_field[$];
  int cur_field_id = 0;
  always @(negedge clk) if (rst_n) begin
    vid_pix_valid = 0;
    if (dut.sof1 || dut.sof2) begin
      if (dut.sof1) n_sof1++; else n_sof2++;
      cur_field_id = dut.sof2;
      field_words[cur_field_id].delete();
    end
    if (vid_dec_valid) begin
      chk(vid_exp.size() > 0 && vid_dec_word == vid_exp[0], $sformatf("decoder word %h", vid_dec_word));
      if (vid_exp.size() > 0) void'(vid_exp.pop_front());
      n_vid_words++;
      vid_pix_valid = 1; vid_pix = vid_dec_word;      // identity decoder
      field_words[cur_field_id].push_back(vid_dec_word);
    end
  end

  task automatic video_field();
    @(negedge clk); vid_vsync = 1;
    repeat (3) @(negedge clk); vid_vsync = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < NWORDS; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      if (w[15:8] == 8'hFF) w[7:0] = 8'h00;
      if (w[7:0] == 8'hFF) w[7:0] = 8'hFE;
      @(negedge clk); vid_coder_valid = 1; vid_coder_word = w; vid_coder_lcode = (i == NWORDS - 1);
      vid_exp.push_back(w);
      @(negedge clk); vid_coder_valid = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  // ------------------------------------------------------------ audio
  function automatic logic [15:0] sat_add(input logic [15:0] a, input logic [15:0] b);
    int v;
    v = int'($signed(a)) + int'($signed(b));
    return v > 32767 ? 16'h7FFF : v < -32768 ? 16'h8000 : 16'(v);
  endfunction

  int aud_n = 0;
  int aud_mode = 0, aud_skip = 0;                 // 0 plain, 1 volume, 2 loopback, 3 mix
  int n_aud_vol = 0, n_aud_loop = 0, n_aud_mix = 0;
  int last_real = -1;
  always @(negedge clk) if (rst_n) begin
    if (aud_tick) begin
      aud_n++;
      aud_left_in  = 16'(aud_n);
      aud_right_in = 16'(aud_n) ^ 16'h5A5A;
    end
    if (aud_out_valid && aud_skip > 0) aud_skip--;
    else if (aud_out_valid && aud_mode == 1) begin          // volume 64/128 on both
      logic [15:0] c0, c1;
      c0 = 16'($signed((({aud_left_out, 1'b0}) ^ 16'h5A5A)) >>> 1);
      c1 = 16'($signed((({aud_left_out, 1'b1}) ^ 16'h5A5A)) >>> 1);
      chk((aud_left_out == 0 && aud_right_out == 0) ||
          (aud_left_out == 16'hD280 && aud_right_out == 16'h0787) ||
          aud_right_out == c0 || aud_right_out == c1,
          $sformatf("half-volume sample %h/%h", aud_left_out, aud_right_out));
      n_aud_vol++;
    end else if (aud_out_valid && aud_mode == 2) begin     // loopback: the local input
      chk(aud_left_out == 16'(aud_n) && aud_right_out == (16'(aud_n) ^ 16'h5A5A),
          $sformatf("loopback sample %h/%h, local %h", aud_left_out, aud_right_out, 16'(aud_n)));
      n_aud_loop++;
    end else if (aud_out_valid && aud_mode == 3) begin     // mix: received + local
      logic [15:0] n, m;
      n = 16'(aud_n);
      m = aud_left_out - n;
      chk((m == 0 && aud_right_out == (n ^ 16'h5A5A)) ||
          (m == 16'hA500 && aud_right_out == sat_add(16'h0F0F, n ^ 16'h5A5A)) ||
          (m <= n && aud_right_out == sat_add(m ^ 16'h5A5A, n ^ 16'h5A5A)),
          $sformatf("mixed sample %h/%h, local %h", aud_left_out, aud_right_out, n));
      n_aud_mix++;
    end else if (aud_out_valid) begin
      if (aud_left_out == 0 && aud_right_out == 0) n_aud_zero++;
      else if (aud_left_out == 16'hA500 && aud_right_out == 16'h0F0F) n_aud_injected++;
      else begin
        chk(aud_right_out == (aud_left_out ^ 16'h5A5A) && int'(aud_left_out) <= aud_n,
            $sformatf("audio sample %h/%h", aud_left_out, aud_right_out));
        chk(int'(aud_left_out) >= last_real, "audio samples in order");
        last_real = int'(aud_left_out);
        n_aud_real++;
      end
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(rt_init_busy, "route table clearing after reset");
    while (rt_init_busy) @(negedge clk);

    // routes and headers
    route(VCI_CPU,   DEST_CPU,   1, 1, 1);
    route(VCI_HOST,  DEST_CPU,   1, 1, 1);
    route(VCI_VIDEO, DEST_VIDEO, 0, 0, 1);
    route(VCI_AUDIO, DEST_AUDIO, 0, 0, 1);
    route(VCI_IMAGE, DEST_IMAGE, 0, 0, 1);
    for (int s = 0; s < 3; s++) begin
      logic [31:0] h;
      h = hdr_of(s == 0 ? VCI_AUDIO : s == 1 ? VCI_VIDEO : VCI_CPU);
      pbw(PB_HG_BASE + 16'(2*s), h[31:16]);
      pbw(PB_HG_BASE + 16'(2*s + 1), h[15:0]);
    end
    pbw(PB_RX_CTRL, 16'h0001);              // drop cells with a bad HEC
    pbw(PB_VID_CTRL, 16'h0003);
    pbw(PB_AUD_CTRL, 16'h0003);             // 44.1 kHz stereo, tx and rx on

    // mailbox
    pbw(PB_AUD_MEM + 16'h0010, 16'h005A);
    pbw(PB_AUD_MEM + 16'h03FF, 16'h0077);
    @(negedge clk);
    chk(dsp_int, "DSP interrupt raised"); if (dsp_int) n_dsp_int++;
    dsp_en = 1; dsp_we = 0; dsp_addr = 10'h010; @(negedge clk);
    chk(dsp_rdata == 8'h5A, "DSP reads the CPU's byte");
    dsp_addr = 10'h3FF; @(negedge clk); @(negedge clk);
    chk(!dsp_int && dsp_rdata == 8'h77, "DSP interrupt cleared by its read");
    dsp_we = 1; dsp_addr = 10'h3FE; dsp_wdata = 8'h33; @(negedge clk);
    dsp_en = 0; dsp_we = 0; @(negedge clk);
    chk(cpu_int, "CPU interrupt raised"); if (cpu_int) n_cpu_int++;
    cpu_mem_rd = 1; cpu_mem_addr = 10'h3FE; @(negedge clk); cpu_mem_rd = 0; @(negedge clk);
    chk(!cpu_int && cpu_mem_rdata == 8'h33, "CPU interrupt cleared by its read");

    fork
      begin : video_src
        for (int f = 0; f < 6; f++) begin
          video_field();
          repeat (3000) @(negedge clk);
        end
      end
      begin : cpu_src
        for (int k = 0; k < 12; k++) begin
          cpu_send(hdr_of(VCI_CPU), 0, 0, 1);
          repeat (500) @(negedge clk);
        end
        cpu_send(hdr_of(VCI_CPU), 1, 0, 0);   // bad HEC: dropped
        cpu_send(hdr_of(VCI_NONE), 0, 0, 0);  // unrouted: ignored
        for (int k = 0; k < 5; k++)           // image cells
          cpu_send(hdr_of(VCI_IMAGE), 0, 0, 0);
        begin                                 // external image source
          logic [7:0] c[$];
          logic [31:0] h;
          h = hdr_of(VCI_CPU);
          for (int i = 0; i < 4; i++) c.push_back(h[8*(3-i) +: 8]);
          c.push_back(ref_hec(h));
          for (int i = 0; i < 48; i++) c.push_back(8'(i));
          exp_cells[32'h0001_0203] = c;
          for (int i = 0; i < 48; i++) isrc.push_back(8'(i));
        end
      end
      begin : host_src
        for (int k = 0; k < 24; k++) begin
          if (k % 3 == 0) host_cell(hdr_of(VCI_HOST), 1);
          else host_cell(k % 2 ? 32'h0000_0000 : 32'h0000_0001, 0);
          repeat ($urandom_range(0, 100)) @(negedge clk);
        end
      end
    join
    // audio: let the receive FIFO run low (duplications), then bursts from
    // the CPU push it above three quarters (deletions) and to overflow
    repeat (60000) @(negedge clk);
    line_fast = 1;
    for (int k = 0; k < 4; k++) cpu_send(hdr_of(VCI_CPU), 0, 0, 1);
    for (int k = 0; k < 8; k++) cpu_send(hdr_of(VCI_AUDIO), 0, 1, 0);
    repeat (2000) @(negedge clk);
    line_fast = 0;
    repeat (30000) @(negedge clk);
    for (int k = 0; k < 9; k++) cpu_send(hdr_of(VCI_AUDIO), 0, 1, 0);
    repeat (2000) @(negedge clk);
    for (int k = 0; k < 3; k++) cpu_send(hdr_of(VCI_AUDIO), 0, 1, 0);
    repeat (60000) @(negedge clk);

    // output path: half volume, then loopback, then mixing
    aud_mode = 1; aud_skip = 3; pbw(PB_AUD_VOL, 16'h4040);
    repeat (20 * 454) @(negedge clk);
    aud_mode = 2; aud_skip = 3; pbw(PB_AUD_VOL, 16'h8080); pbw(PB_AUD_CTRL, 16'h0103);
    repeat (20 * 454) @(negedge clk);
    aud_mode = 3; aud_skip = 3; pbw(PB_AUD_CTRL, 16'h0203);
    repeat (20 * 454) @(negedge clk);
    aud_mode = 0; aud_skip = 3; pbw(PB_AUD_CTRL, 16'h0003);

    // encoder: read back both fields of the frame buffer
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); vid_fb_rd_reset = 2'(1 << f);
      @(negedge clk); vid_fb_rd_reset = 0;
      for (int i = 0; i < field_words[f].size(); i++) begin
        vid_fb_re = 2'(1 << f);
        @(negedge clk);
        vid_fb_re = 0;
        chk(vid_fb_rdata == field_words[f][i], $sformatf("frame buffer field %0d word %0d", f, i));
        n_fb_reads++;
      end
    end

    // ------------------------------------------------------ summary
    chk(exp_cells.size() == 0, $sformatf("%0d expected cells never reached the CPU", exp_cells.size()));
    chk(img_exp.size() == 0, "all image bytes displayed");
    chk(vid_exp.size() == 0, "all video words decoded");
    chk(n_fast_cells >= 12, $sformatf("cells sent back to back at one byte per clock: %0d", n_fast_cells));
    chk(n_cpu_cells >= 12 + 4 + 8 + 1, $sformatf("cells to the CPU RxFIFO: %0d", n_cpu_cells));
    chk(n_img_bytes == 5 * 48, $sformatf("image bytes: %0d", n_img_bytes));
    chk(n_vid_words == 6 * NWORDS, $sformatf("video words: %0d", n_vid_words));
    chk(n_sof1 == 3 && n_sof2 == 3 && dut.u_vid_rx_ctrl.fields_done == 16'd6, "field tags");
    chk(vid_fields_sent == 16'd6 && vid_fields_received == 16'd6, "field counters");
    chk(n_fb_reads > 0, "frame buffer read back");
    chk(rx_cells_dropped == 16'd1, $sformatf("cells dropped for bad HEC: %0d", rx_cells_dropped));
    chk(y_cells_deleted == 16'd16 && y_cells_kept == 16'd8, "null cells deleted");
    chk(tx_contended > 0, $sformatf("arbitrations with contention: %0d", tx_contended));
    chk(tx_cells_sent[SRC_AUDIO] > 0 && tx_cells_sent[SRC_VIDEO] == 16'd24 &&
        tx_cells_sent[SRC_IMAGE] == 16'd1 && tx_cells_sent[SRC_Y] == 16'd8,
        "cells sent per source");
    chk(n_aud_real > 200, $sformatf("audio samples played: %0d", n_aud_real));
    chk(aud_dup_count > 0, $sformatf("audio duplications: %0d", aud_dup_count));
    chk(aud_del_count > 0, $sformatf("audio deletions: %0d", aud_del_count));
    chk(aud_zero_count > 0 && n_aud_zero > 0, $sformatf("audio zero samples: %0d", aud_zero_count));
    chk(aud_err, "audio receive FIFO overflow reported");
    chk(n_aud_injected > 0, "injected audio cells played");
    chk(n_aud_skipped > 0, $sformatf("bytes of a cell discarded after an overflow clear: %0d", n_aud_skipped));
    chk(n_aud_vol > 10 && n_aud_loop > 10 && n_aud_mix > 10,
        $sformatf("volume/loopback/mix samples: %0d/%0d/%0d", n_aud_vol, n_aud_loop, n_aud_mix));
    chk(n_dsp_int == 1 && n_cpu_int == 1, "mailbox interrupts");
    $display("cpu cells %0d, image bytes %0d, video words %0d, tags %0d/%0d, fb reads %0d",
             n_cpu_cells, n_img_bytes, n_vid_words, n_sof1, n_sof2, n_fb_reads);
    $display("dropped %0d, y kept/deleted %0d/%0d, contended %0d, audio real/zero/inj %0d/%0d/%0d, dup %0d del %0d",
             rx_cells_dropped, y_cells_kept, y_cells_deleted, tx_contended, n_aud_real, n_aud_zero,
             n_aud_injected, aud_dup_count, aud_del_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

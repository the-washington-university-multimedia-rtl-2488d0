// tb_audio_rate_adapt: the rate adapter behind a real 256-byte receive FIFO.
// Cells (12 stereo pairs or 24 mono samples) are written at varying rates so
// that the FIFO runs empty, stays low, sits in the middle, rises above three
// quarters and finally overflows.  A model of the rules (play, duplicate the
// last pair of a cell, delete the first pair, play zeros, clear on full)
// predicts every sample; the test also requires that each rule was used.
module tb_audio_rate_adapt;
  localparam int DEPTH = 256;
  localparam int LW = $clog2(DEPTH) + 1;
  logic clk = 0, rst_n = 0;
  logic rx_on = 0, mono = 0, tick = 0;
  logic wr_en = 0;
  logic [7:0] wr_data = 0, fifo_data;
  logic [LW-1:0] level;
  logic empty, full, ltq, gt3q, fifo_rd, fifo_clear;
  logic [15:0] left, right, dup_count, del_count, zero_count;
  logic sample_valid, err_full;
  int checks = 0, failures = 0, nerr = 0;

  mmx_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(fifo_clear), .wr_en, .wr_data, .rd_en(fifo_rd), .rd_data(fifo_data),
    .pfull_thresh(LW'(48)), .level, .empty, .full, .pfull(), .lt_quarter(ltq), .gt_3quarter(gt3q));

  audio_rate_adapt #(.PAIRS(12), .LW(LW)) dut (
    .clk, .rst_n, .rx_on, .mono, .tick, .fifo_level(level), .fifo_full(full),
    .fifo_lt_quarter(ltq), .fifo_gt_3quarter(gt3q), .fifo_data, .fifo_rd, .fifo_clear,
    .left, .right, .sample_valid, .err_full, .dup_count, .del_count, .zero_count);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // model
  byte unsigned q[$];
  logic [31:0] exp_q[$];
  int m_err = 0;
  int idx = 0, m_dup = 0, m_del = 0, m_zero = 0;
  bit rep = 0, dupm = 0;
  logic [31:0] last = 0;

  always @(negedge clk) if (rst_n && sample_valid) begin
    chk(exp_q.size() > 0 && {left, right} == exp_q[0],
        $sformatf("sample %h exp %h", {left, right}, exp_q.size() ? exp_q[0] : 0));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end
  always @(negedge clk) if (err_full) nerr++;

  task automatic model_tick();
    int bps, spc;
    bit del;
    logic [31:0] s;
    bps = mono ? 2 : 4;
    spc = mono ? 24 : 12;
    if (q.size() == DEPTH) begin
      q.delete(); idx = 0; rep = 0; exp_q.push_back(0); m_err++;
    end else if (rep) begin
      rep = 0; exp_q.push_back(last); m_dup++;
    end else if (q.size() < bps) begin
      exp_q.push_back(0); m_zero++;
    end else begin
      del = 0;
      if (idx == 0) begin
        dupm = q.size() < DEPTH / 4;
        if (q.size() > 3 * DEPTH / 4 && q.size() >= 2 * bps) begin
          del = 1; m_del++;
          repeat (bps) void'(q.pop_front());
        end
      end
      s = 0;
      repeat (bps) s = {s[23:0], q.pop_front()};
      if (mono) s = {s[15:0], s[15:0]};
      last = s;
      exp_q.push_back(s);
      idx += del ? 2 : 1;
      if (idx >= spc) begin idx = 0; rep = dupm; end
    end
  endtask

  task automatic one_tick();
    @(negedge clk); tick = 1;
    model_tick();
    @(negedge clk); tick = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic push_cell();
    for (int i = 0; i < 48; i++) begin
      @(negedge clk); wr_en = 1; wr_data = 8'($urandom);
      if (q.size() < DEPTH) q.push_back(wr_data);
    end
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); rx_on = 1;
    for (int ph = 0; ph < 2; ph++) begin
      mono = (ph == 1);
      idx = 0; rep = 0;
      repeat (5) one_tick();                             // empty: zeros
      for (int n = 0; n < 300; n++) begin                // slow feed: stays low
        if (n % 13 == 0) push_cell();
        one_tick();
      end
      for (int n = 0; n < 400; n++) begin                // fast feed: rises
        if (n % 6 == 0) push_cell();
        one_tick();
      end
      for (int n = 0; n < 400; n++) begin                // near balance: high
        if (n % 11 == 0) push_cell();
        one_tick();
      end
      for (int n = 0; n < 10; n++) push_cell();          // overflow
      one_tick();
      repeat (5) one_tick();
    end
    repeat (20) @(negedge clk);
    chk(exp_q.size() == 0, "all samples played");
    chk(m_dup > 0 && dup_count == 16'(m_dup), $sformatf("duplications %0d", m_dup));
    chk(m_del > 0 && del_count == 16'(m_del), $sformatf("deletions %0d", m_del));
    chk(m_zero > 0 && zero_count == 16'(m_zero), $sformatf("zero samples %0d", m_zero));
    chk(m_err >= 2 && nerr == m_err, $sformatf("full errors %0d", nerr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_audio_rate_gen: measures the tick period for all eight rate selections
// (small divider) and checks DIV_441 * m / 2 with m = 2,3,4,5,6,8,10,12; with
// the default divider it checks that twelve ticks, one stereo cell, take
// 12 * 454 clocks = 272.4 us at 20 MHz.
module tb_audio_rate_gen;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [2:0] rate_sel = 0, rate_full = 0;
  logic tick, tick_full;
  int checks = 0, failures = 0;
  int m_tab[8] = '{2, 3, 4, 5, 6, 8, 10, 12};

  audio_rate_gen #(.DIV_441(20)) dut (.clk, .rst_n, .enable, .rate_sel, .tick);
  audio_rate_gen u_full (.clk, .rst_n, .enable, .rate_sel(rate_full), .tick(tick_full));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); rate_sel = 3'(r);
      do @(posedge clk); while (!tick);
      do @(posedge clk); while (!tick);
      for (int k = 0; k < 3; k++) begin
        cyc = 0;
        do begin @(posedge clk); cyc++; end while (!tick);
        chk(cyc == 20 * m_tab[r] / 2, $sformatf("rate %0d period %0d exp %0d", r, cyc, 20 * m_tab[r] / 2));
      end
    end
    do @(posedge clk); while (!tick_full);
    cyc = 0;
    for (int k = 0; k < 12; k++) do begin @(posedge clk); cyc++; end while (!tick_full);
    chk(cyc == 12 * 454, $sformatf("one cell of samples in %0d clocks", cyc));
    @(negedge clk); enable = 0;
    repeat (2000) begin @(posedge clk); #1 chk(!tick, "no tick when disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

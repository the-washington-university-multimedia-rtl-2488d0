// tb_audio_mixer: checks audio_mixer against an integer model.
//
// Random local samples are latched by random ticks; random received pairs
// arrive with random volumes and modes (normal, loopback, mix, both).  Each
// output pair is compared, one clock after its input, with the model:
// pick or saturated sum, times vol / 128 with floor, saturated to 16 bits.
// Full-scale values are forced now and then so that both saturations occur,
// and each mode is counted so that a mode never exercised is a failure.
module tb_audio_mixer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               tick = 0, in_valid = 0, loopback = 0, mix = 0;
  logic signed [15:0] loc_left = 0, loc_right = 0, rx_left = 0, rx_right = 0;
  logic        [7:0]  vol_left = 128, vol_right = 128;
  logic               out_valid;
  logic signed [15:0] out_left, out_right;

  audio_mixer dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int sat(input int v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction
  function automatic int model(input int rx, input int loc, input int vol, input bit lb, input bit mx);
    int s, p;
    s = lb ? loc : mx ? sat(rx + loc) : rx;
    p = s * vol;
    return sat(p >>> 7);
  endfunction

  function automatic logic [15:0] rnd16();
    case ($urandom_range(0, 5))
      0: return 16'h7FFF;
      1: return 16'h8000;
      default: return 16'($urandom);
    endcase
  endfunction

  int lat_l = 0, lat_r = 0;       // model of the latched local pair
  int exp_l, exp_r;
  bit pend = 0;
  int n_norm = 0, n_loop = 0, n_mix = 0, n_sat = 0, n_vol = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // check the output of the previous clock's input
      chk(out_valid == pend, "out_valid follows in_valid by one clock");
      if (pend) begin
        chk(int'(out_left) == exp_l, $sformatf("left %0d exp %0d", out_left, exp_l));
        chk(int'(out_right) == exp_r, $sformatf("right %0d exp %0d", out_right, exp_r));
      end
      // new stimulus
      tick = ($urandom_range(0, 3) == 0);
      loc_left = rnd16(); loc_right = rnd16();
      in_valid = ($urandom_range(0, 1) == 0);
      rx_left = rnd16(); rx_right = rnd16();
      loopback = ($urandom_range(0, 3) == 0);
      mix = ($urandom_range(0, 2) == 0);
      vol_left  = ($urandom_range(0, 1) == 0) ? 8'd128 : 8'($urandom);
      vol_right = ($urandom_range(0, 1) == 0) ? 8'd128 : 8'($urandom);
      pend = in_valid;
      if (in_valid) begin
        exp_l = model(int'(rx_left),  lat_l, int'(vol_left),  loopback, mix);
        exp_r = model(int'(rx_right), lat_r, int'(vol_right), loopback, mix);
        if (loopback) n_loop++; else if (mix) n_mix++; else n_norm++;
        if (vol_left != 128) n_vol++;
        if (exp_l == 32767 || exp_l == -32768) n_sat++;
      end
      if (tick) begin lat_l = int'(loc_left); lat_r = int'(loc_right); end
    end
    chk(n_norm > 100 && n_loop > 100 && n_mix > 100, "every mode exercised");
    chk(n_vol > 100 && n_sat > 100, "volume and saturation exercised");
    $display("normal %0d loopback %0d mix %0d volume %0d saturated %0d", n_norm, n_loop, n_mix, n_vol, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

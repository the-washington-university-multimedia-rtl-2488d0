// tb_frame_buffer: a small frame buffer with writes and reads in both fields
// at random, pointer resets, and pointers that wrap and pass each other.
// A model keeps both memories and all four pointers; every read is checked.
module tb_frame_buffer;
  localparam int FW = 37;
  logic clk = 0, rst_n = 0;
  logic we = 0, wr_field = 0;
  logic [15:0] wdata = 0, rdata;
  logic [1:0] wr_reset = 0, re = 0, rd_reset = 0;
  int checks = 0, failures = 0;
  logic [15:0] m [2][FW];
  int wp[2], rp[2];
  bit init[2][FW];

  frame_buffer #(.FIELD_WORDS(FW)) dut (.*);
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
    int rf;
    logic [15:0] exp;
    bit doread, expvalid;
    wp = '{0, 0}; rp = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 2) != 0);
      wr_field = 1'($urandom);
      wdata = 16'($urandom);
      wr_reset = ($urandom_range(0, 60) == 0) ? 2'(1 << $urandom_range(0, 1)) : 2'b00;
      rd_reset = ($urandom_range(0, 60) == 0) ? 2'(1 << $urandom_range(0, 1)) : 2'b00;
      rf = $urandom_range(0, 1);
      doread = (n > 200) && $urandom_range(0, 1);
      re = doread ? 2'(1 << rf) : 2'b00;
      expvalid = doread && init[rf][rp[rf]];
      exp = m[rf][rp[rf]];
      @(posedge clk); #1;
      if (we) begin
        m[wr_field][wp[wr_field]] = wdata; init[wr_field][wp[wr_field]] = 1;
      end
      for (int f = 0; f < 2; f++) begin
        if (wr_reset[f]) wp[f] = 0;
        else if (we && wr_field == 1'(f)) wp[f] = (wp[f] + 1) % FW;
        if (rd_reset[f]) rp[f] = 0;
        else if (re[f]) rp[f] = (rp[f] + 1) % FW;
      end
      if (expvalid) chk(rdata == exp, $sformatf("read field %0d: %h exp %h", rf, rdata, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

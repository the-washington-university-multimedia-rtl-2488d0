// tb_frame_buffer_full: the frame buffer at its full NTSC field size.
//
// Uses frame_buffer with its default parameters (two fields of 153,600
// 16-bit words, 640 x 240 pixels at 4:2:2) and runs the workload it exists
// for: the display encoder reads one whole field while the decoder writes
// the other, one word per clock each, and both pointers wrap at the end of
// the field.  Steps:
//   1. write all of field one;
//   2. write all of field two while reading all of field one, checking every
//      word;
//   3. read five more words of field one (read pointer wrapped to 0);
//   4. write three more words into field two (write pointer wrapped,
//      overwriting its first words), reset field two's read pointer and read
//      the whole field back.
// Data are a different linear pattern per field, so a word from the wrong
// field or the wrong address is caught.  About 620,000 clocks.
module tb_frame_buffer_full;
  localparam int N = 153600;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic        we = 0, wr_field = 0;
  logic [15:0] wdata = 0, rdata;
  logic [1:0]  wr_reset = 0, re = 0, rd_reset = 0;

  frame_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [15:0] p0(input int i); return 16'(i * 40503 + 7);     endfunction
  function automatic logic [15:0] p1(input int i); return 16'(i * 9973 + 12345);  endfunction
  function automatic logic [15:0] q1(input int i); return 16'(i * 777 + 4242);    endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rd_i;
  bit rd_pend = 0;
  logic [15:0] rd_exp;

  // the expectation is registered with the read, compared a half clock later
  bit          pend_q = 0;
  logic [15:0] exp_q;
  int          i_q;
  always @(posedge clk) begin
    pend_q <= rd_pend && re != 0;
    exp_q  <= rd_exp;
    i_q    <= rd_i;
  end
  always @(negedge clk) begin
    if (pend_q) chk(rdata == exp_q, $sformatf("read %0d: %h expected %h", i_q, rdata, exp_q));
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. field one
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; wr_field = 0; wdata = p0(i);
    end
    // 2. field two written while field one is displayed
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; wr_field = 1; wdata = p1(i);
      re = 2'b01; rd_pend = 1; rd_i = i; rd_exp = p0(i);
    end
    // 3. read pointer of field one wraps
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      we = 0; re = 2'b01; rd_i = i; rd_exp = p0(i);
    end
    // 4. write pointer of field two wraps, then read field two from the top
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      re = 0; rd_pend = 0; we = 1; wr_field = 1; wdata = q1(i);
    end
    @(negedge clk); we = 0; rd_reset = 2'b10;
    @(negedge clk); rd_reset = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      re = 2'b10; rd_pend = 1; rd_i = i; rd_exp = (i < 3) ? q1(i) : p1(i);
    end
    @(negedge clk); re = 0; rd_pend = 0;
    @(negedge clk);
    chk(checks == 2 * N + 5, $sformatf("words checked: %0d", checks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

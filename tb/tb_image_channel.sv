// tb_image_channel: bursts of image bytes into the channel while the display
// transmitter takes bytes at a quarter of the clock rate (a 40 Mb/s byte slot
// every fourth clock); checks order and completeness of the output, that a
// byte goes out in every slot while data waits, and overflow counting.
module tb_image_channel;
  logic clk = 0, rst_n = 0, wr_en = 0, taxi_rdy = 0;
  logic [7:0] wr_data = 0, taxi_data;
  logic taxi_strb, empty;
  logic [15:0] overflow;
  logic [31:0] bytes_sent;
  int checks = 0, failures = 0, sent = 0;
  byte unsigned exp_q[$];

  image_channel #(.DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  bit ovf_phase = 0;
  bit slot_q = 0, had_data_q = 0;
  always @(negedge clk) if (rst_n) begin
    if (slot_q && had_data_q && !ovf_phase) chk(taxi_strb, "byte sent in a slot while data waited");
    if (taxi_strb && !ovf_phase) begin
      chk(exp_q.size() > 0 && taxi_data == exp_q[0], $sformatf("byte %h", taxi_data));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      sent++;
    end
    cyc++;
    taxi_rdy   = (cyc % 4 == 0);
    slot_q     = taxi_rdy;
    had_data_q = !empty;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 30; burst++) begin
      int n;
      n = $urandom_range(1, 40);
      for (int i = 0; i < n; i++) begin
        @(negedge clk); #1;
        wr_en = 1; wr_data = 8'($urandom);
        exp_q.push_back(wr_data);
      end
      @(negedge clk); #1 wr_en = 0;
      repeat ($urandom_range(50, 200)) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    chk(exp_q.size() == 0 && bytes_sent == 32'(sent), "all bytes sent");
    ovf_phase = 1;
    // overflow: 100 bytes back to back into 64 places, slots every 4 clocks
    for (int i = 0; i < 100; i++) begin @(negedge clk); #1 wr_en = 1; wr_data = 8'(i); end
    @(negedge clk); #1 wr_en = 0;
    chk(overflow > 0, "overflow counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_audio_packer: random stereo and mono samples at random tick spacing;
// checks the bytes written (L hi, L lo, R hi, R lo or L hi, L lo), that
// nothing is written while off, and that ticks closer than the byte
// sequence are counted as overruns.
module tb_audio_packer;
  logic clk = 0, rst_n = 0, tx_on = 0, mono = 0, tick = 0;
  logic [15:0] left = 0, right = 0, overruns;
  logic wr_en;
  logic [7:0] wr_data;
  int checks = 0, failures = 0;
  byte unsigned exp_q[$];

  audio_packer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && wr_en) begin
    chk(exp_q.size() > 0 && wr_data == exp_q[0], $sformatf("byte %h", wr_data));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      tx_on = (n >= 20);
      mono  = (n >= 300);
      left  = 16'($urandom); right = 16'($urandom);
      tick  = 1;
      if (tx_on) begin
        exp_q.push_back(left[15:8]); exp_q.push_back(left[7:0]);
        if (!mono) begin exp_q.push_back(right[15:8]); exp_q.push_back(right[7:0]); end
      end
      @(negedge clk);
      tick = 0;
      repeat ($urandom_range(4, 10)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0, "all bytes written");
    chk(overruns == 0, "no overrun at legal spacing");
    // two ticks one clock apart: the second is lost
    @(negedge clk); tick = 1; mono = 0;
    exp_q.push_back(left[15:8]); exp_q.push_back(left[7:0]); exp_q.push_back(right[15:8]); exp_q.push_back(right[7:0]);
    @(negedge clk); tick = 0;
    @(negedge clk); tick = 1;
    @(negedge clk); tick = 0;
    repeat (10) @(negedge clk);
    chk(overruns == 16'd1 && exp_q.size() == 0, "overrun counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tag_stuffer: feeds fields of random code words (last one with LCODE)
// through a modelled coder FIFO, with random back-pressure, and compares the
// byte stream with FF D0/D1 + words (high byte first) + FF D9 built here.
// Words queued outside a field must be dropped and counted.
module tb_tag_stuffer;
  logic clk = 0, rst_n = 0;
  logic in_empty = 1, in_lcode = 0, in_rd;
  logic [15:0] in_word = 0;
  logic sof_req = 0, sof_field = 0, out_ready = 1, out_valid;
  logic [7:0] out_data;
  logic [15:0] words_dropped, fields_closed;
  int checks = 0, failures = 0;
  logic [16:0] q[$];
  byte unsigned exp_q[$];
  logic rd_seen;

  tag_stuffer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) rd_seen <= in_rd;
  always @(negedge clk) if (rst_n) begin
    if (rd_seen) void'(q.pop_front());
    in_empty  = (q.size() == 0);
    {in_lcode, in_word} = q.size() > 0 ? q[0] : 17'h0;
    out_ready = 1'($urandom_range(0, 3) != 0);
    if (out_valid) begin
      chk(exp_q.size() > 0 && out_data == exp_q[0], $sformatf("byte %h exp %h", out_data, exp_q.size() ? exp_q[0] : 0));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
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
    // stray words before any field start
    for (int i = 0; i < 5; i++) q.push_back({1'b0, 16'($urandom)});
    repeat (20) @(negedge clk);
    chk(words_dropped == 16'd5, "stray words dropped");
    for (int f = 0; f < 40; f++) begin
      int n;
      n = $urandom_range(1, 60);
      @(negedge clk);
      sof_req = 1; sof_field = 1'(f % 2);
      exp_q.push_back(8'hFF); exp_q.push_back(f % 2 ? 8'hD1 : 8'hD0);
      @(negedge clk);
      sof_req = 0;
      for (int i = 0; i < n; i++) begin
        logic [15:0] w;
        w = 16'($urandom);
        if (w[15:8] == 8'hFF) w[7:0] = 8'h00;    // coder output is byte-stuffed
        q.push_back({i == n - 1, w});
        exp_q.push_back(w[15:8]); exp_q.push_back(w[7:0]);
        if ($urandom_range(0, 1)) @(negedge clk);
      end
      exp_q.push_back(8'hFF); exp_q.push_back(8'hD9);
      while (exp_q.size() > 0) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    chk(fields_closed == 16'd40, "end-of-field tags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tag_stripper: builds tagged fields byte by byte (data containing
// byte-stuffed FF 00 pairs and odd byte counts), feeds them through a modelled
// FIFO with random stalls, and checks the tag pulses and the 16-bit words
// against the pairing worked out here.
module tb_tag_stripper;
  logic clk = 0, rst_n = 0;
  logic in_empty = 1, in_rd, out_ready = 1, out_valid, sof1, sof2, eof;
  logic [7:0] in_data = 0;
  logic [15:0] out_word;
  int checks = 0, failures = 0;
  byte unsigned q[$];
  logic [17:0] exp_q[$];     // {kind, value}: 0 word, 1 sof1, 2 sof2, 3 eof
  logic rd_seen;
  int nsof1 = 0, nsof2 = 0, neof = 0;

  tag_stripper dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) rd_seen <= in_rd;
  always @(negedge clk) if (rst_n) begin
    logic [1:0] kind;
    if (rd_seen) void'(q.pop_front());
    in_empty  = (q.size() == 0) || ($urandom_range(0, 4) == 0);
    in_data   = q.size() > 0 ? q[0] : 8'h00;
    out_ready = 1'($urandom_range(0, 3) != 0);
    if (out_valid || sof1 || sof2 || eof) begin
      chk(32'(out_valid) + 32'(sof1) + 32'(sof2) + 32'(eof) == 1, "one event per clock");
      kind = sof1 ? 2'd1 : sof2 ? 2'd2 : eof ? 2'd3 : 2'd0;
      chk(exp_q.size() > 0 && kind == exp_q[0][17:16] && (kind != 0 || out_word == exp_q[0][15:0]),
          $sformatf("event %0d word %h exp %h", kind, out_word, exp_q.size() ? exp_q[0] : 0));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      if (sof1) nsof1++;
      if (sof2) nsof2++;
      if (eof) neof++;
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
    for (int f = 0; f < 60; f++) begin
      byte unsigned data[$];
      int n;
      n = $urandom_range(1, 80);
      for (int i = 0; i < n; i++) begin
        byte unsigned b;
        b = ($urandom_range(0, 5) == 0) ? 8'hFF : 8'($urandom);
        data.push_back(b);
        if (b == 8'hFF) data.push_back(8'h00);
      end
      q.push_back(8'hFF); q.push_back(f % 2 ? 8'hD1 : 8'hD0);
      exp_q.push_back({f % 2 ? 2'd2 : 2'd1, 16'h0});
      foreach (data[i]) q.push_back(data[i]);
      for (int i = 0; i + 1 < data.size(); i += 2) exp_q.push_back({2'd0, data[i], data[i+1]});
      q.push_back(8'hFF); q.push_back(8'hD9);
      exp_q.push_back({2'd3, 16'h0});
      while (q.size() > 0) @(negedge clk);
      repeat (3) @(negedge clk);
    end
    chk(exp_q.size() == 0, "all events seen");
    chk(nsof1 == 30 && nsof2 == 30 && neof == 60, "tag counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

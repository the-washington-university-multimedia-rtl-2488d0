// tb_header_buffer: cells with random headers, with and without idle clocks
// inside and between cells.  Checks that the route index is the VPI[2:0],
// VCI[11:0] of each header, that every byte comes out once, in order, with its
// cell position, that byte 0 leaves exactly when payload byte 0 enters for
// back-to-back bytes (five-byte delay), and that the last cell drains.
module tb_header_buffer;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_soc = 0;
  logic [7:0] in_data = 0;
  logic [14:0] route_idx;
  logic idx_valid, out_valid, out_soc;
  logic [5:0] out_pos;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int in_cnt = 0, out_cnt = 0;
  logic [13:0] exp_q[$];          // {pos, data}
  int soc_in_cycle, soc_out_cycle, cycle = 0;

  header_buffer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [13:0] e;
    e = exp_q.pop_front();
    chk({out_pos, out_data} == e, $sformatf("byte %0d: got %0d/%h exp %0d/%h", out_cnt, out_pos, out_data, e[13:8], e[7:0]));
    chk(out_soc == (out_pos == 0), "out_soc");
    out_cnt++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] hdr[4];
    logic [14:0] exp_idx;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      bit gaps;
      gaps = (c >= 20);
      for (int i = 0; i < 4; i++) hdr[i] = 8'($urandom);
      exp_idx = {hdr[1][6:4], hdr[2], hdr[3][7:4]};
      for (int b = 0; b < 53; b++) begin
        @(negedge clk);
        in_valid = 1;
        in_soc   = (b == 0);
        in_data  = (b < 4) ? hdr[b] : 8'($urandom);
        exp_q.push_back({6'(b), in_data});
        in_cnt++;
        @(posedge clk); #1;
        if (b == 3) chk(idx_valid && route_idx == exp_idx, $sformatf("route index cell %0d", c));
        if (b == 5 && !gaps) chk(out_valid && out_soc, "byte 0 leaves when payload byte 0 enters");
        if (gaps && $urandom_range(0, 2) == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk);
      in_valid = 0;
      if (gaps) repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    chk(out_cnt == in_cnt && exp_q.size() == 0, "all bytes drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

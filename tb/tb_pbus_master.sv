// tb_pbus_master: issues random CPU writes through the PBUS interface into a
// pbus_slave decoder and checks the bus phases (address with ALE, then data
// with WR, two clocks per cycle, busy in between) and every decoded write.
module tb_pbus_master;
  import mmx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req = 0;
  logic [15:0] addr = 0, wdata = 0;
  logic busy, pbus_ale, pbus_wr;
  logic [15:0] pbus_ad;
  pbus_wr_t wr;
  int checks = 0, failures = 0;
  logic [31:0] exp_q[$];

  pbus_master dut (.*);
  pbus_slave  u_slave (.clk, .rst_n, .pbus_ad, .pbus_ale, .pbus_wr, .wr);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && wr.we) begin
    chk(exp_q.size() > 0 && {wr.addr, wr.data} == exp_q[0], $sformatf("decoded write %h/%h", wr.addr, wr.data));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      chk(!busy, "idle before a request");
      req = 1; addr = 16'($urandom); wdata = 16'($urandom);
      exp_q.push_back({addr, wdata});
      @(negedge clk);
      req = 0;
      chk(busy && pbus_ale && !pbus_wr && pbus_ad == exp_q[$][31:16], "address phase");
      @(negedge clk);
      chk(busy && pbus_wr && !pbus_ale && pbus_ad == exp_q[$][15:0], "data phase");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(exp_q.size() == 0, "all writes decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

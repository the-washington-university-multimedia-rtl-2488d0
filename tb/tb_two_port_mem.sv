// tb_two_port_mem: random reads and writes from both ports against a model
// (port A wins a same-address write collision), plus the two mailbox
// interrupts: set by a write to the other side's mailbox address, cleared by
// the owner's read.
module tb_two_port_mem;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [9:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic int_a, int_b;
  int checks = 0, failures = 0;
  logic [7:0] m [DEPTH];
  bit init[DEPTH];

  two_port_mem dut (.*);
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
    bit ia, ib, chka, chkb;
    logic [7:0] ea, eb;
    ia = 0; ib = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom);
      a_addr = ($urandom_range(0, 9) == 0) ? 10'(DEPTH - 2 + $urandom_range(0, 1)) : 10'($urandom_range(0, 31));
      b_addr = ($urandom_range(0, 9) == 0) ? 10'(DEPTH - 2 + $urandom_range(0, 1)) : 10'($urandom_range(0, 31));
      a_wdata = 8'($urandom); b_wdata = 8'($urandom);
      chka = a_en && !a_we && init[a_addr]; ea = m[a_addr];
      chkb = b_en && !b_we && init[b_addr]; eb = m[b_addr];
      @(posedge clk); #1;
      if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) begin m[b_addr] = b_wdata; init[b_addr] = 1; end
      if (a_en && a_we) begin m[a_addr] = a_wdata; init[a_addr] = 1; end
      if (a_en && a_we && a_addr == 10'(DEPTH - 1)) ib = 1;
      else if (b_en && !b_we && b_addr == 10'(DEPTH - 1)) ib = 0;
      if (b_en && b_we && b_addr == 10'(DEPTH - 2)) ia = 1;
      else if (a_en && !a_we && a_addr == 10'(DEPTH - 2)) ia = 0;
      if (chka) chk(a_rdata == ea, "port A read");
      if (chkb) chk(b_rdata == eb, "port B read");
      chk(int_a == ia && int_b == ib, "interrupts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

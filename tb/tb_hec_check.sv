// tb_hec_check: sends cells with correct and corrupted HEC bytes and checks
// hec_ok against a CRC-8 computed bit by bit in the testbench.
module tb_hec_check;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_soc = 0;
  logic [7:0] in_data = 0;
  logic hec_ok, hec_done;
  int checks = 0, failures = 0;
  int done_cnt = 0;
  always @(negedge clk) if (hec_done) done_cnt++;

  hec_check dut (.*);
  always #5 clk = ~clk;

  // reference: polynomial division of the 32 header bits by x^8+x^2+x+1
  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] h;
    logic [7:0]  hec;
    bit          bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(ref_hec(32'h00000000) == 8'h55, "reference of the zero header");
    for (int c = 0; c < 200; c++) begin
      h   = $urandom;
      bad = (c % 3 == 1);
      hec = ref_hec(h) ^ (bad ? 8'(1 << (c % 8)) : 8'h00);
      for (int b = 0; b < 53; b++) begin
        @(negedge clk);
        in_valid = 1;
        in_soc   = (b == 0);
        in_data  = (b < 4) ? h[8*(3-b) +: 8] : (b == 4) ? hec : 8'($urandom);
        if (b == 5) chk(hec_ok == !bad, $sformatf("cell %0d header %h", c, h));
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk);
      in_valid = 0;
      chk(hec_ok == !bad, "result held");
    end
    chk(done_cnt == 200, "one hec_done per cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

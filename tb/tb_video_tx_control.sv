// tb_video_tx_control: drives vertical sync pulses with transmission off and
// on and checks that each rising edge while on gives one start-of-field
// request, alternating field one / field two from field one, that the coder
// path opens at the first field and closes when transmission stops, and the
// field counter.
module tb_video_tx_control;
  logic clk = 0, rst_n = 0, tx_on = 0, vsync = 0;
  logic sof_req, sof_field, coder_en;
  logic [15:0] fields;
  int checks = 0, failures = 0, nreq = 0, exp_field = 0;

  video_tx_control dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && sof_req) begin
    chk(sof_field == 1'(exp_field), $sformatf("field %0d expected %0d", sof_field, exp_field));
    exp_field = 1 - exp_field;
    nreq++;
  end

  task automatic vs(input int len);
    @(negedge clk); vsync = 1;
    repeat (len) @(negedge clk);
    vsync = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    vs(5); vs(3);
    chk(nreq == 0 && !coder_en, "nothing while off");
    @(negedge clk); tx_on = 1;
    repeat (5) @(negedge clk);
    chk(!coder_en, "coder closed until the first field");
    for (int i = 0; i < 9; i++) begin vs($urandom_range(1, 10)); chk(coder_en, "coder open"); end
    chk(nreq == 9 && fields == 16'd9, "one request per vsync");
    @(negedge clk); tx_on = 0;
    @(negedge clk); @(negedge clk);
    chk(!coder_en, "coder closed when off");
    vs(4);
    chk(nreq == 9, "no request while off");
    @(negedge clk); tx_on = 1; exp_field = 0;
    vs(2); vs(2);
    chk(nreq == 11, "restart with field one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

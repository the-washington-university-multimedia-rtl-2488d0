// tb_video_rx_control: random sequences of tags and data availability;
// checks the decoder enable, the field selected and reset at each start of
// field, the write permission and the counters against a model.
module tb_video_rx_control;
  logic clk = 0, rst_n = 0, rx_on = 0, data_avail = 0, sof1 = 0, sof2 = 0, eof = 0;
  logic engine_en, fb_wr_field, fb_wr_allow;
  logic [1:0] fb_wr_reset;
  logic [15:0] fields_started, fields_done;
  int checks = 0, failures = 0, ns = 0, nd = 0;

  video_rx_control dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_allow, exp_field, p1, p2, pe, on_prev;
    exp_allow = 0; exp_field = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rx_on = (n > 100) && (n < 1500 || n > 1600);
      data_avail = 1'($urandom);
      p1 = 0; p2 = 0; pe = 0;
      case ($urandom_range(0, 20))
        0: p1 = 1;
        1: p2 = 1;
        2: pe = 1;
        default: ;
      endcase
      sof1 = p1; sof2 = p2; eof = pe;
      #1 chk(engine_en == (rx_on && data_avail), "engine enable");
      @(posedge clk); #1;
      if (!rx_on) exp_allow = 0;
      if (p1 || p2) begin exp_field = p2; exp_allow = rx_on; ns++; end
      if (pe) nd++;
      chk(fb_wr_reset == (p1 ? 2'b01 : p2 ? 2'b10 : 2'b00), "write pointer reset");
      chk(fb_wr_field == exp_field, "field written");
      chk(fb_wr_allow == exp_allow, "write allowed");
    end
    chk(fields_started == 16'(ns) && fields_done == 16'(nd), "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

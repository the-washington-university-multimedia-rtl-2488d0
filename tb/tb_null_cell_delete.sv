// tb_null_cell_delete: a host stream mixing real cells with unassigned
// (header 00 00 00 00) and idle (00 00 00 01) cells, plus cells that are zero
// in all but one VPI/VCI bit.  Checks that exactly the non-null cells reach
// the YFIFO write port, byte for byte and in order, and the counters.
module tb_null_cell_delete;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_soc = 0;
  logic [7:0] in_data = 0;
  logic wr_en;
  logic [7:0] wr_data;
  logic [15:0] cells_kept, cells_deleted;
  int checks = 0, failures = 0, nkeep = 0, ndel = 0;
  byte unsigned exp_q[$];

  null_cell_delete dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && wr_en) begin
    chk(exp_q.size() > 0 && wr_data == exp_q[0], $sformatf("written byte %h", wr_data));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] h;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      bit is_null;
      case ($urandom_range(0, 4))
        0: h = 32'h0000_0000;
        1: h = 32'h0000_0001;
        2: h = 32'h1 << $urandom_range(4, 27);   // one GFC/VPI/VCI bit set
        default: h = $urandom;
      endcase
      is_null = (h[31:4] == 28'h0);
      if (is_null) ndel++; else nkeep++;
      for (int b = 0; b < 53; b++) begin
        @(negedge clk);
        in_valid = 1;
        in_soc   = (b == 0);
        in_data  = (b < 4) ? h[8*(3-b) +: 8] : 8'($urandom);
        if (!is_null) exp_q.push_back(in_data);
        if (c > 100 && $urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk);
      in_valid = 0;
      if (c > 50) repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    chk(exp_q.size() == 0, "every kept byte written");
    chk(cells_kept == 16'(nkeep) && cells_deleted == 16'(ndel), "counters");
    $display("kept %0d deleted %0d", nkeep, ndel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

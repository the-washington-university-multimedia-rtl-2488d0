// tb_mmx_fifo: random pushes and pops against a queue model; checks the head
// word, the level and every flag after each clock, and that a write to a full
// FIFO and a read of an empty one change nothing.
module tb_mmx_fifo;
  localparam int DEPTH = 16;
  localparam int LW = $clog2(DEPTH) + 1;
  logic clk = 0, rst_n = 0;
  logic clear = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [LW-1:0] level;
  logic empty, full, pfull, ltq, gt3q;
  int checks = 0, failures = 0;
  byte unsigned q[$];

  mmx_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .clear, .wr_en, .wr_data, .rd_en, .rd_data,
    .pfull_thresh(LW'(6)), .level, .empty, .full, .pfull,
    .lt_quarter(ltq), .gt_3quarter(gt3q));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(0, 99) < (n < 1500 ? 65 : 35));
      rd_en   = ($urandom_range(0, 99) < (n < 1500 ? 35 : 65));
      wr_data = 8'($urandom);
      clear   = (n == 2000);
      @(posedge clk);
      #1;
      if (clear) q.delete();
      else begin
        bit pop_ok, push_ok;
        pop_ok  = rd_en && q.size() > 0;
        push_ok = wr_en && q.size() < DEPTH;
        if (pop_ok) void'(q.pop_front());
        if (push_ok) q.push_back(wr_data);
      end
      chk(level == LW'(q.size()), "level");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      chk(pfull == (q.size() >= 6), "pfull");
      chk(ltq == (q.size() < DEPTH/4), "lt_quarter");
      chk(gt3q == (q.size() > 3*DEPTH/4), "gt_3quarter");
      if (q.size() > 0) chk(rd_data == q[0], "head word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

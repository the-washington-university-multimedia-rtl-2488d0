// tb_route_table: waits for the clearing sweep, checks that entries read
// "no destination", writes entries over the decoded PBUS port (index
// register plus auto-incrementing data register) and reads them back with
// the one-clock read latency.  A small IDX_W keeps the sweep short.
module tb_route_table;
  import mmx_pkg::*;
  localparam int IDX_W = 8;
  logic clk = 0, rst_n = 0;
  pbus_wr_t pbus = '0;
  logic [IDX_W-1:0] rd_idx = 0;
  route_entry_t rd_entry;
  logic init_busy;
  int checks = 0, failures = 0, sweep = 0;
  logic [5:0] model [2**IDX_W];

  route_table #(.IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic pw(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); pbus = '{we: 1'b1, addr: a, data: d};
    @(negedge clk); pbus = '0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (init_busy) begin @(posedge clk); sweep++; end
    chk(sweep >= 2**IDX_W && sweep <= 2**IDX_W + 2, $sformatf("sweep took %0d clocks", sweep));
    for (int i = 0; i < 2**IDX_W; i++) model[i] = 6'b0;
    for (int i = 0; i < 2**IDX_W; i += 7) begin
      @(negedge clk); rd_idx = IDX_W'(i);
      @(posedge clk); #1;
      chk(rd_entry == route_entry_t'(6'b0), "cleared entry");
    end
    // bursts of writes from random start indices
    for (int k = 0; k < 20; k++) begin
      int start, len;
      start = $urandom_range(0, 2**IDX_W - 1);
      len   = $urandom_range(1, 10);
      pw(PB_RT_INDEX, 16'(start));
      for (int j = 0; j < len; j++) begin
        logic [5:0] e;
        e = 6'($urandom);
        pw(PB_RT_DATA, 16'(e));
        model[(start + j) % (2**IDX_W)] = e;
      end
    end
    pw(16'h3000, 16'h003F);   // another address: no effect
    for (int i = 0; i < 2**IDX_W; i++) begin
      @(negedge clk); rd_idx = IDX_W'(i);
      @(posedge clk); #1;
      chk(rd_entry == route_entry_t'(model[i]), $sformatf("entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

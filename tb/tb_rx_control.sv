// tb_rx_control: streams 53-byte cells with random route entries and HEC
// results, with the drop option on and off, and checks each byte's FIFO
// select against the rule worked out here: one destination per cell, header
// / HEC / payload gated by the entry bits, nothing for a dropped cell; also
// checks the routed and dropped cell counters.
module tb_rx_control;
  import mmx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable = 1, in_valid = 0, in_soc = 0, hec_ok = 1, drop_bad_hec = 0;
  logic [5:0] in_pos = 0;
  route_entry_t entry;
  logic [3:0] fifo_sel;
  logic [15:0] cells_routed, cells_dropped;
  int checks = 0, failures = 0, exp_routed = 0, exp_dropped = 0;

  rx_control dut (.*);
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
    entry = '{dest: DEST_NONE, default: 1'b0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      route_entry_t e;
      bit ok, drop, pass, part;
      logic [3:0] exp;
      e.dest            = dest_e'($urandom_range(0, 4));
      e.deliver_hdr     = 1'($urandom);
      e.deliver_hec     = 1'($urandom);
      e.deliver_payload = 1'($urandom);
      ok   = ($urandom_range(0, 3) != 0);
      drop = (c >= 100);
      pass = !(drop && !ok);
      if (drop && !ok) exp_dropped++;
      else if (e.dest != DEST_NONE) exp_routed++;
      for (int b = 0; b < 53; b++) begin
        @(negedge clk);
        in_valid     = 1;
        in_soc       = (b == 0);
        in_pos       = 6'(b);
        drop_bad_hec = drop;
        // the entry and the HEC result only hold at byte 0
        entry  = (b == 0) ? e : route_entry_t'(6'($urandom));
        hec_ok = (b == 0) ? ok : 1'($urandom);
        part = (b < 4) ? e.deliver_hdr : (b == 4) ? e.deliver_hec : e.deliver_payload;
        exp  = '0;
        if (pass && part && e.dest != DEST_NONE) exp[int'(e.dest) - 1] = 1'b1;
        #1;
        chk(fifo_sel == exp, $sformatf("cell %0d byte %0d sel %b exp %b", c, b, fifo_sel, exp));
      end
      @(negedge clk);
      in_valid = 0;
      #1 chk(fifo_sel == 4'b0, "no select between cells");
    end
    @(negedge clk);
    chk(cells_routed == 16'(exp_routed), "routed count");
    chk(cells_dropped == 16'(exp_dropped), "dropped count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

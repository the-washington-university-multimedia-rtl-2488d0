// tb_tx_select: five modelled source FIFOs (audio, video, image with header
// insertion; Y and CPU sending whole cells) filled at random.  Checks that
// each arbitration picks the highest-priority ready source, that every cell
// is 53 bytes with the generated header and HEC position first when insertion
// is on, that payload bytes come out of each source in order, that a cell
// takes exactly 53 byte slots (53 clocks with tx_rdy always high), and that
// contention happened.
module tb_tx_select;
  import mmx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] src_ready = 0;
  logic [4:0][7:0] src_data = '0;
  logic [4:0] src_rd, gen_en = 5'b00111;
  logic [2:0] hdr_src, hdr_pos;
  logic [7:0] hdr_byte;
  logic tx_rdy = 1, tx_valid, tx_soc;
  logic [7:0] tx_data;
  logic [4:0][15:0] cells_sent;
  logic [15:0] contended;
  int checks = 0, failures = 0, cells = 0;

  byte unsigned q[5][$];      // modelled FIFOs
  byte unsigned sent[5][$];   // what each source put in, for comparison
  logic [4:0] rd_seen;
  byte unsigned cnt[5];

  tx_select dut (.*);
  always #5 clk = ~clk;

  // stand-in header table: 1, source, position
  assign hdr_byte = {1'b1, hdr_src, 1'b0, hdr_pos};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk) rd_seen <= src_rd;

  // FIFO model, updated between clock edges
  int phase = 0;
  int exp_pick = -1;
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 5; i++) if (rd_seen[i]) void'(q[i].pop_front());
    for (int i = 0; i < 3; i++)
      if ($urandom_range(0, 99) < (phase == 0 ? 12 : 5)) begin
        byte unsigned b;
        b = {1'b0, 3'(i), cnt[i][3:0]}; cnt[i]++;
        q[i].push_back(b); sent[i].push_back(b);
      end
    for (int i = 3; i < 5; i++)
      if ($urandom_range(0, 999) < (phase == 0 ? 3 : 1) && q[i].size() < 200)
        for (int k = 0; k < 53; k++) begin
          byte unsigned b;
          b = {1'b0, 3'(i), cnt[i][3:0]}; cnt[i]++;
          q[i].push_back(b); sent[i].push_back(b);
        end
    for (int i = 0; i < 5; i++) begin
      src_ready[i] = q[i].size() >= (gen_en[i] ? 48 : 53);
      src_data[i]  = q[i].size() > 0 ? q[i][0] : 8'h00;
    end
    tx_rdy = (phase == 0) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
    // arbitration check: the pick made at the last edge
    if (exp_pick >= 0) begin
      chk(dut.busy && int'(dut.cur) == exp_pick, $sformatf("picked %0d, expected %0d", dut.cur, exp_pick));
      exp_pick = -1;
    end
    if (!dut.busy && src_ready != 0)
      for (int i = 4; i >= 0; i--) if (src_ready[i]) exp_pick = i;
  end

  // output cell check
  byte unsigned cellb[$];
  int first_cycle, cycle = 0;
  always @(posedge clk) cycle++;
  always @(negedge clk) if (rst_n && tx_valid) begin
    if (tx_soc) begin
      chk(cellb.size() == 0, "previous cell complete");
      cellb.delete();
      first_cycle = cycle;
    end
    cellb.push_back(tx_data);
    if (cellb.size() == 53) begin
      int s, p0;
      bit gen;
      gen = cellb[0][7];
      s   = gen ? int'(cellb[0][6:4]) : int'(cellb[0][6:4]);
      chk(s < 5 && gen == gen_en[s], "source identified");
      if (gen) for (int p = 0; p < 5; p++) chk(cellb[p] == {1'b1, 3'(s), 1'b0, 3'(p)}, "generated header byte");
      p0 = gen ? 5 : 0;
      for (int p = p0; p < 53; p++) begin
        byte unsigned e;
        e = sent[s].pop_front();
        chk(cellb[p] == e, $sformatf("src %0d byte %0d: %h exp %h", s, p, cellb[p], e));
      end
      if (phase == 0) chk(cycle - first_cycle == 52, $sformatf("cell took %0d clocks", cycle - first_cycle + 1));
      cells++;
      cellb.delete();
    end
  end

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    phase = 1;
    repeat (20000) @(posedge clk);
    chk(cells > 100, $sformatf("%0d cells sent", cells));
    chk(contended > 0, "some arbitrations had several sources ready");
    chk(cells_sent[0] > 0 && cells_sent[3] > 0 && cells_sent[4] > 0, "audio, Y and CPU cells sent");
    $display("cells %0d contended %0d", cells, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

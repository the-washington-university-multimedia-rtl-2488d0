// tb_header_gen: writes headers for the five sources over the decoded PBUS
// port and reads back every byte and the HEC, which is computed here by
// polynomial division; also checks the reset value and rewrite of the
// per-source insertion enables.
module tb_header_gen;
  import mmx_pkg::*;
  logic clk = 0, rst_n = 0;
  pbus_wr_t pbus = '0;
  logic [2:0] src = 0, pos = 0;
  logic [7:0] hdr_byte;
  logic [4:0] gen_en;
  int checks = 0, failures = 0;
  logic [31:0] model [5];

  header_gen dut (.*);
  always #5 clk = ~clk;

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
    @(negedge clk);
    chk(gen_en == 5'b00111, "insertion on for the three channels after reset");
    for (int round = 0; round < 10; round++) begin
      for (int s = 0; s < 5; s++) begin
        model[s] = $urandom;
        pw(PB_HG_BASE + 16'(2*s),     model[s][31:16]);
        pw(PB_HG_BASE + 16'(2*s + 1), model[s][15:0]);
      end
      for (int s = 0; s < 5; s++)
        for (int p = 0; p < 5; p++) begin
          logic [7:0] e;
          @(negedge clk);
          src = 3'(s); pos = 3'(p);
          e = (p < 4) ? model[s][8*(3-p) +: 8] : ref_hec(model[s]);
          #1 chk(hdr_byte == e, $sformatf("src %0d byte %0d: %h exp %h", s, p, hdr_byte, e));
        end
    end
    pw(PB_HG_ENABLE, 16'h0018);
    @(negedge clk);
    chk(gen_en == 5'b11000, "enable register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

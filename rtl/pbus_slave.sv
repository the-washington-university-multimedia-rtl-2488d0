// pbus_slave: PBUS decoder on a card.
//
// Latches the address while pbus_ale is high and, when pbus_wr comes in the
// data phase, presents one decoded write (pbus_wr_t: we, addr, data) for one
// clock to the registers and tables of the card.  The write is registered, so
// it appears in the clock after the data phase.  Pairs with pbus_master.
module pbus_slave
  import mmx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pbus_ad,
  input  logic        pbus_ale,
  input  logic        pbus_wr,
  output pbus_wr_t    wr
);
  logic [15:0] a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      wr  <= '0;
    end else begin
      if (pbus_ale) a_q <= pbus_ad;
      wr.we   <= pbus_wr;
      wr.addr <= a_q;
      wr.data <= pbus_ad;
    end
  end
endmodule

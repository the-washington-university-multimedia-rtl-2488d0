// two_port_mem: the audio channel's two-port mailbox memory.
//
// DEPTH bytes (1K x 8) shared by the local CPU, through the PBUS (port A),
// and the audio DSP (port B).  Both ports can read and write in the same
// clock; reads are synchronous (data the clock after the address).  If both
// ports write the same address in one clock, port A wins.  The memory also
// carries an interrupt to each side: a port-A write to the top address
// (DEPTH-1) raises int_b (DSP interrupt) until port B reads that address; a
// port-B write to DEPTH-2 raises int_a (local CPU interrupt) until port A
// reads it.  Size and the two interrupts are from the document; the
// interrupt rule is the usual mailbox convention and this design's choice.
module two_port_mem #(
  parameter int DEPTH = 1024,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [7:0]    a_wdata,
  output logic [7:0]    a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [7:0]    b_wdata,
  output logic [7:0]    b_rdata,
  output logic          int_a,
  output logic          int_b
);
  localparam logic [AW-1:0] MBOX_B = AW'(DEPTH - 1);  // written by A, read by B
  localparam logic [AW-1:0] MBOX_A = AW'(DEPTH - 2);  // written by B, read by A

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_a <= 1'b0;
      int_b <= 1'b0;
    end else begin
      if (a_en && a_we && a_addr == MBOX_B)       int_b <= 1'b1;
      else if (b_en && !b_we && b_addr == MBOX_B) int_b <= 1'b0;
      if (b_en && b_we && b_addr == MBOX_A)       int_a <= 1'b1;
      else if (a_en && !a_we && a_addr == MBOX_A) int_a <= 1'b0;
    end
  end
endmodule

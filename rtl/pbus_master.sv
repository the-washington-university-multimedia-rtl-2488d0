// pbus_master: the ATMizer's PBUS Interface.
//
// The PBUS is a 16-bit multiplexed address/data bus, derived from the local
// CPU bus, over which the CPU programs the multimedia cards and the ATMizer's
// own tables.  This block turns a CPU write request (16-bit word address and
// 16-bit data) into a two-clock PBUS cycle:
//   clock 1: pbus_ad = address, pbus_ale = 1  (address phase)
//   clock 2: pbus_ad = data,    pbus_wr  = 1  (data phase)
// busy is high while a cycle is in progress; a request is accepted in any
// clock in which busy is low and is then held in the block.  The bus width
// and multiplexing follow the document; the phase timing, the strobe names
// and the fact that only writes are carried are this design's choices.
module pbus_master (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  output logic        busy,
  output logic [15:0] pbus_ad,
  output logic        pbus_ale,
  output logic        pbus_wr
);
  typedef enum logic [1:0] {IDLE, ADDR, DATA} state_e;
  state_e      state;
  logic [15:0] a_q, d_q;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      a_q   <= '0;
      d_q   <= '0;
    end else begin
      unique case (state)
        IDLE: if (req) begin
          a_q   <= addr;
          d_q   <= wdata;
          state <= ADDR;
        end
        ADDR: state <= DATA;
        DATA: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    pbus_ad  = '0;
    pbus_ale = 1'b0;
    pbus_wr  = 1'b0;
    if (state == ADDR) begin
      pbus_ad  = a_q;
      pbus_ale = 1'b1;
    end else if (state == DATA) begin
      pbus_ad  = d_q;
      pbus_wr  = 1'b1;
    end
  end
endmodule

// audio_rate_gen: sample-rate strobe of the audio channel.
//
// Produces one tick per audio sample at one of eight rates, 44.1 kHz divided
// by 1, 1.5, 2, 2.5, 3, 4, 5 or 6 (44.1, 29.4, 22.05, 17.64, 14.7, 11.025,
// 8.82 and 7.35 kHz), chosen by rate_sel.  DIV_441 is the number of system
// clocks per 44.1 kHz sample (454 for a 20 MHz clock, 272.4 us per 12-sample
// cell); the period for rate r is DIV_441 * m(r) / 2 with m = 2,3,4,5,6,8,10,12.
// The document gives the span of eight rates; the divisor set and deriving
// the rate from the system clock are this design's.  A change of rate_sel
// takes effect at the next tick.
module audio_rate_gen #(
  parameter int DIV_441 = 454
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [2:0] rate_sel,
  output logic       tick
);
  localparam int CW = $clog2(DIV_441 * 6 + 1);
  logic [CW-1:0] cnt, period;

  always_comb begin
    unique case (rate_sel)
      3'd0: period = CW'(DIV_441);
      3'd1: period = CW'((DIV_441 * 3) / 2);
      3'd2: period = CW'(DIV_441 * 2);
      3'd3: period = CW'((DIV_441 * 5) / 2);
      3'd4: period = CW'(DIV_441 * 3);
      3'd5: period = CW'(DIV_441 * 4);
      3'd6: period = CW'(DIV_441 * 5);
      default: period = CW'(DIV_441 * 6);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (!enable) begin
        cnt <= '0;
      end else if (cnt >= period - 1'b1) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule

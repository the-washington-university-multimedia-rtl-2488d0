// audio_mixer: volume, loopback and mixing on the audio output path.
//
// The audio channel's output passes through this block on its way to the
// codec.  For each sample pair from the rate adapter (in_valid), it forms the
// pair to play:
//   - normal:   the received pair;
//   - loopback: the local input pair instead (the codec's own input, as it
//               was latched at the last sample tick);
//   - mix:      received + local, each channel saturated to 16 bits;
// and then scales each channel by its volume: out = sample * vol / 128,
// saturated.  vol = 128 is unity gain; up to 255 amplifies nearly twice and
// 0 mutes.  The result appears, with out_valid, one clock after in_valid.
// Loopback wins over mix when both are set.
//
// The local input is latched on every tick so that loopback and mixing use
// the same sample the packer sends to the network.  Samples are two's
// complement.  In mono mode the adapter repeats the left channel on the
// right, so both channels simply pass through the same arithmetic.
//
// The document gives the DSP these functions ("volume, loopback, mixing,
// and amplification") but not how they are computed; the gain law, the
// saturation, the priority of loopback over mixing and doing them in logic
// are this design's choices.
module audio_mixer (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,       // sample tick: latch the local input
  input  logic signed [15:0] loc_left,   // local codec input
  input  logic signed [15:0] loc_right,
  input  logic               in_valid,   // received pair from the rate adapter
  input  logic signed [15:0] rx_left,
  input  logic signed [15:0] rx_right,
  input  logic               loopback,
  input  logic               mix,
  input  logic        [7:0]  vol_left,   // 128 = unity
  input  logic        [7:0]  vol_right,
  output logic               out_valid,
  output logic signed [15:0] out_left,
  output logic signed [15:0] out_right
);
  logic signed [15:0] loc_l_q, loc_r_q;

  function automatic logic signed [15:0] sat16(input logic signed [25:0] v);
    if (v > 26'sd32767)       return 16'sh7FFF;
    else if (v < -26'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  // pick or mix, then scale by vol/128
  function automatic logic signed [15:0] chan(input logic signed [15:0] rx,
                                              input logic signed [15:0] loc,
                                              input logic [7:0] vol,
                                              input logic lb, input logic mx);
    logic signed [16:0] sum;
    logic signed [15:0] s;
    logic signed [25:0] p;
    sum = 17'(rx) + 17'(loc);
    if (lb)      s = loc;
    else if (mx) s = sat16(26'(sum));
    else         s = rx;
    p = 26'(s) * $signed({1'b0, vol});
    return sat16(p >>> 7);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loc_l_q   <= '0;
      loc_r_q   <= '0;
      out_valid <= 1'b0;
      out_left  <= '0;
      out_right <= '0;
    end else begin
      if (tick) begin
        loc_l_q <= loc_left;
        loc_r_q <= loc_right;
      end
      out_valid <= in_valid;
      if (in_valid) begin
        out_left  <= chan(rx_left,  loc_l_q, vol_left,  loopback, mix);
        out_right <= chan(rx_right, loc_r_q, vol_right, loopback, mix);
      end
    end
  end
endmodule

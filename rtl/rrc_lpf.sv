// rrc_lpf: root raised cosine lowpass FIR filter, rolloff factor 1.
//
// Follows each correlator of the bandpass demodulator.  The rolloff of 1 and
// the use of a root raised cosine are the receiver's; the length (33 taps, one
// OQPSK symbol of 2T = 16 samples either side of the centre), the 10-bit
// coefficients and the output scaling are this design's choices.
// Coefficient k (k = 0..32, t = k-16 samples, Ts = 16 samples) is
//   h(t) = 4*cos(2*pi*t/Ts) / (pi*(1 - 16*(t/Ts)**2)),  h(+-Ts/4) = 1,
// scaled so that the centre tap is 511 and rounded to the nearest integer.
// The filter attenuates the 2*f0 product term, which falls at exactly half
// the 32 MHz sample rate.
//
// Interface: a sample `din` is taken on each clock with `en` high.  Two clocks
// later `dout` holds the filter output up to and including that sample,
// shifted right by OUT_SHIFT and saturated to OUT_W bits, and `dout_valid`
// is high for that one clock.  Direct form: NTAPS multipliers and one adder tree.
module rrc_lpf #(
  parameter int unsigned IN_W      = 16,
  parameter int unsigned OUT_W     = 9,
  parameter int unsigned COEF_W    = 10,
  parameter int unsigned NTAPS     = 33,
  parameter int unsigned OUT_SHIFT = 18,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = '{
    -10'sd34, -10'sd36, -10'sd32, -10'sd20, 10'sd0, 10'sd30, 10'sd69, 10'sd116,
    10'sd170, 10'sd229, 10'sd289, 10'sd348, 10'sd401, 10'sd447, 10'sd482,
    10'sd504, 10'sd511, 10'sd504, 10'sd482, 10'sd447, 10'sd401, 10'sd348,
    10'sd289, 10'sd229, 10'sd170, 10'sd116, 10'sd69, 10'sd30, 10'sd0,
    -10'sd20, -10'sd32, -10'sd36, -10'sd34}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(NTAPS);
  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(1 << (OUT_W - 1));

  logic signed [IN_W-1:0]  taps [NTAPS];   // taps[0] is the newest sample
  logic signed [ACC_W-1:0] acc, scaled;
  logic                    en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NTAPS); i++) taps[i] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int i = 1; i < int'(NTAPS); i++) taps[i] <= taps[i-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < int'(NTAPS); i++)
      acc += ACC_W'(taps[i]) * ACC_W'(COEF[i]);
    scaled = acc >>> OUT_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q       <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      en_q       <= en;
      dout_valid <= en_q;
      if (en_q) begin
        if (scaled > OUT_MAX)      dout <= OUT_MAX[OUT_W-1:0];
        else if (scaled < OUT_MIN) dout <= OUT_MIN[OUT_W-1:0];
        else                       dout <= scaled[OUT_W-1:0];
      end
    end
  end

endmodule

// doqpsk_demod: bandpass differential demodulator for DOQPSK.
//
// The 8 MHz IF signal, sampled at 32 MHz, is multiplied by two delayed copies
// of itself: delayed by D + T/2 for the X branch and by D for the Y branch.
// Each product is lowpass filtered by a root raised cosine filter (rrc_lpf).
// With T = 8 samples (the bit period) and D = 9 samples, exp(j*2*pi*f0*D) = j,
// so the real products equal the imaginary part of the complex differential
// product and no Hilbert transform or down-conversion is needed.  The two
// lags, the 8-bit input and the 9-bit X/Y outputs are the receiver's; the
// product register and the filter scaling are this design's choices.
//
// Interface: one IF sample per clock with `if_valid` high (every clock at
// 32 MHz).  `x`/`y` are updated with `xy_valid` high three clocks after the
// sample that completes them (one product register plus the filter's two).
module doqpsk_demod #(
  parameter int unsigned IN_W      = 8,
  parameter int unsigned OUT_W     = 9,
  parameter int unsigned T         = 8,
  parameter int unsigned D         = 9,
  parameter int unsigned OUT_SHIFT = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    if_valid,
  input  logic signed [IN_W-1:0]  if_sample,
  output logic signed [OUT_W-1:0] x,
  output logic signed [OUT_W-1:0] y,
  output logic                    xy_valid
);

  localparam int unsigned PROD_W = 2 * IN_W;

  logic signed [IN_W-1:0]   dly_x, dly_y;
  logic signed [PROD_W-1:0] prod_x, prod_y;
  logic                     prod_valid;
  logic                     y_valid_unused;

  delay_line #(.WIDTH(IN_W), .DEPTH(D + T / 2)) u_dly_x (
    .clk, .rst_n, .en(if_valid), .din(if_sample), .dout(dly_x));
  delay_line #(.WIDTH(IN_W), .DEPTH(D)) u_dly_y (
    .clk, .rst_n, .en(if_valid), .din(if_sample), .dout(dly_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_x     <= '0;
      prod_y     <= '0;
      prod_valid <= 1'b0;
    end else begin
      prod_valid <= if_valid;
      if (if_valid) begin
        prod_x <= if_sample * dly_x;
        prod_y <= if_sample * dly_y;
      end
    end
  end

  rrc_lpf #(.IN_W(PROD_W), .OUT_W(OUT_W), .OUT_SHIFT(OUT_SHIFT)) u_lpf_x (
    .clk, .rst_n, .en(prod_valid), .din(prod_x), .dout(x), .dout_valid(xy_valid));
  rrc_lpf #(.IN_W(PROD_W), .OUT_W(OUT_W), .OUT_SHIFT(OUT_SHIFT)) u_lpf_y (
    .clk, .rst_n, .en(prod_valid), .din(prod_y), .dout(y), .dout_valid(y_valid_unused));

endmodule

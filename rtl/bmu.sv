// bmu: branch metric unit of the 8-state Viterbi decoder.
//
// For a received pair (X, Y) it computes, for each of the 16 bit quadruples i,
//   metric_i = (X - g_i,X)**2 + (Y - g_i,Y)**2,
// the squared Euclidean distance to that quadruple's centre of gravity.  The
// formula, the 9-bit X/Y inputs, the 16 centres and the 7-bit metric outputs
// are the receiver's.  How the full distance (up to 20 bits) is brought to
// 7 bits is this design's choice: it is shifted right by METRIC_SHIFT and
// saturated at 127.
//
// Interface: inputs are taken when `in_valid` is high; all 16 metrics are
// registered and `out_valid` is high one clock later.
module bmu #(
  parameter int unsigned XY_W         = 9,
  parameter int unsigned M_W          = 7,
  parameter int unsigned METRIC_SHIFT = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [XY_W-1:0] x,
  input  logic signed [XY_W-1:0] y,
  input  logic signed [XY_W-1:0] gx [doqpsk_pkg::N_BRANCH],
  input  logic signed [XY_W-1:0] gy [doqpsk_pkg::N_BRANCH],
  output logic [M_W-1:0]         metric [doqpsk_pkg::N_BRANCH],
  output logic                   out_valid
);
  import doqpsk_pkg::*;

  localparam int unsigned DIFF_W = XY_W + 1;
  localparam int unsigned DIST_W = 2 * DIFF_W + 1;
  localparam logic [DIST_W-1:0] M_MAX = DIST_W'((1 << M_W) - 1);

  logic [M_W-1:0] metric_d [N_BRANCH];

  always_comb begin
    for (int i = 0; i < int'(N_BRANCH); i++) begin
      logic signed [DIFF_W-1:0] dx, dy;
      logic [DIST_W-1:0]        dsq, scaled;
      dx     = DIFF_W'(x) - DIFF_W'(gx[i]);
      dy     = DIFF_W'(y) - DIFF_W'(gy[i]);
      dsq   = DIST_W'(dx * dx) + DIST_W'(dy * dy);
      scaled = dsq >> METRIC_SHIFT;
      metric_d[i] = (scaled > M_MAX) ? M_MAX[M_W-1:0] : scaled[M_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_BRANCH); i++) metric[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) metric <= metric_d;
    end
  end

endmodule

// acs: add-compare-select unit and path metric registers P0..P7.
//
// Trellis: state s (3 bits, newest bit in the MSB) is reached from the two
// states {s[1:0],0} and {s[1:0],1} on new bit s[2]; the branch from
// predecessor p on bit b uses metric 15 - {b,p} (see doqpsk_pkg).  For every
// state the two candidate sums P[p] + metric are compared and the smaller
// (closer) one is kept; `sel[s]` records which predecessor won (1 = odd one).
// The trellis, the 8 x 10-bit path metrics and the 8 decision bits are the
// receiver's.
// Normalisation is this design's choice: metrics wrap modulo 2**PM_W and are
// compared through the sign of their difference.  With 7-bit branch metrics
// any state reaches any other in 3 steps, so live path metrics differ by at
// most 3*127 = 381 and candidates by at most 508 < 2**(PM_W-1) = 512: the
// wrap-around comparison is then always exact.  Ties keep the even
// predecessor.  An assertion checks the spread bound in simulation.
//
// Interface: one trellis step per clock with `in_valid` high; `pm` and `sel`
// are registered and `out_valid` is high one clock later.  Reset sets all
// path metrics to zero (all starting states equally likely).
module acs #(
  parameter int unsigned M_W  = 7,
  parameter int unsigned PM_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [M_W-1:0]    metric [doqpsk_pkg::N_BRANCH],
  output logic [PM_W-1:0]   pm     [doqpsk_pkg::N_STATES],
  output logic [doqpsk_pkg::N_STATES-1:0] sel,
  output logic              out_valid
);
  import doqpsk_pkg::*;

  logic [PM_W-1:0]     pm_next  [N_STATES];
  logic [N_STATES-1:0] sel_next;

  always_comb begin
    for (int s = 0; s < int'(N_STATES); s++) begin
      state_t         p0, p1;
      logic [PM_W-1:0] c0, c1, diff;
      p0 = pred_state(2'(s), 1'b0);
      p1 = pred_state(2'(s), 1'b1);
      c0 = pm[p0] + PM_W'(metric[branch_index(s[2], p0)]);
      c1 = pm[p1] + PM_W'(metric[branch_index(s[2], p1)]);
      diff = c1 - c0;              // negative (MSB set) when c1 < c0
      sel_next[s] = diff[PM_W-1];
      pm_next[s]  = diff[PM_W-1] ? c1 : c0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(N_STATES); s++) pm[s] <= '0;
      sel       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pm  <= pm_next;
        sel <= sel_next;
      end
    end
  end

  // The wrap-around comparison relies on every path metric staying within
  // 3 * (2**M_W - 1) of every other; check it against P0.
  localparam int SPREAD_MAX = 3 * ((1 << M_W) - 1);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int s = 1; s < int'(N_STATES); s++) begin
        logic signed [PM_W-1:0] rel;
        rel = $signed(pm[s] - pm[0]);
        a_spread : assert (int'(rel) <= SPREAD_MAX && int'(rel) >= -SPREAD_MAX)
          else $error("acs: path metric %0d drifted %0d from P0", s, rel);
      end
    end
  end

endmodule

// viterbi: 8-state soft-decision Viterbi decoder for the DOQPSK statistics.
//
// Chain of the three units of the receiver's decoder: the branch metric unit
// (bmu) scores the received (X, Y) against the 16 centres of gravity, the
// add-compare-select unit (acs) updates the 8 path metrics P0..P7 and the
// decision bits, max_p picks the best state and the survivor memory (smu)
// emits the decoded bit.  This follows the receiver's decoder block diagram;
// the widths (9-bit X/Y, 7-bit metrics, 10-bit path metrics, 3-bit state)
// are the receiver's, the survivor depth and metric scaling this design's.
//
// Interface: one (X, Y) pair per trellis step with `in_valid` high, at most
// one per clock (in the receiver, one per 8 clocks, i.e. at the 4 Mbit/s bit
// rate).  `outbit` appears with `out_valid` three clocks later and is the
// trellis bit of the step SMU_DEPTH-1 steps earlier.
module viterbi #(
  parameter int unsigned XY_W         = 9,
  parameter int unsigned M_W          = 7,
  parameter int unsigned PM_W         = 10,
  parameter int unsigned METRIC_SHIFT = 7,
  parameter int unsigned SMU_DEPTH    = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [XY_W-1:0] x,
  input  logic signed [XY_W-1:0] y,
  input  logic signed [XY_W-1:0] gx [doqpsk_pkg::N_BRANCH],
  input  logic signed [XY_W-1:0] gy [doqpsk_pkg::N_BRANCH],
  output logic                   outbit,
  output logic                   out_valid
);
  import doqpsk_pkg::*;

  logic [M_W-1:0]      metric [N_BRANCH];
  logic                metric_valid;
  logic [PM_W-1:0]     pm [N_STATES];
  logic [N_STATES-1:0] sel;
  logic                acs_valid;
  state_t              maxmem;

  bmu #(.XY_W(XY_W), .M_W(M_W), .METRIC_SHIFT(METRIC_SHIFT)) u_bmu (
    .clk, .rst_n, .in_valid, .x, .y, .gx, .gy, .metric, .out_valid(metric_valid));

  acs #(.M_W(M_W), .PM_W(PM_W)) u_acs (
    .clk, .rst_n, .in_valid(metric_valid), .metric, .pm, .sel, .out_valid(acs_valid));

  max_p #(.PM_W(PM_W)) u_max_p (.pm, .maxmem);

  smu #(.DEPTH(SMU_DEPTH)) u_smu (
    .clk, .rst_n, .in_valid(acs_valid), .sel, .maxmem, .outbit, .out_valid);

endmodule

// doqpsk_rx: digital part of a differentially coherent DOQPSK receiver.
//
// The 8-bit A/D samples of the 8 MHz IF, taken at 32 MHz, go through the
// bandpass differential demodulator (two real correlators with lags D + T/2
// and D, T = 8, D = 9, each followed by a root raised cosine lowpass), are
// downsampled by 8 to the 4 Mbit/s bit rate and decoded by the 8-state
// soft-decision Viterbi decoder, which compares each (X, Y) pair with 16
// trained centres of gravity.  This chain is the receiver's.
//
// The centres ("VA parameters") come from one of two sources, chosen by
// `use_trained`:
//   0: a register bank loaded from `g_ext_x/g_ext_y` when `g_load` is high
//      (centres trained off line);
//   1: the on-chip gravity_trainer, which learns them in real time from a
//      known bit sequence (`train_en`, `train_bit`).
// Both sources and the run-time switch between them are this design's way of
// providing the off-line and real-time training the receiver allows.  The
// whole design runs on the 32 MHz sample clock; the decoder is enabled once
// per bit instead of running on its own 4 MHz clock.
//
// Interface and timing: one sample per clock with `if_valid` high.
// `sample_phase` picks which of the 8 samples per bit is kept.  `xy_valid`
// marks each bit-rate (X, Y) pair; `train_bit` must be the known trellis bit
// belonging to that pair.  `outbit` (with `outbit_valid`) is the decoded
// trellis bit; it lags the pair it belongs to by SMU_DEPTH-1 bits plus three
// clocks.  `g_x/g_y` show the centres in use.
module doqpsk_rx #(
  parameter int unsigned IN_W         = 8,
  parameter int unsigned XY_W         = 9,
  parameter int unsigned T            = 8,
  parameter int unsigned D            = 9,
  parameter int unsigned DEMOD_SHIFT  = 18,
  parameter int unsigned M_W          = 7,
  parameter int unsigned PM_W         = 10,
  parameter int unsigned METRIC_SHIFT = 7,
  parameter int unsigned SMU_DEPTH    = 20,
  parameter int unsigned AVG_SHIFT    = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // A/D samples
  input  logic                   if_valid,
  input  logic signed [IN_W-1:0] if_sample,
  input  logic [$clog2(T)-1:0]   sample_phase,
  // centres of gravity
  input  logic                   use_trained,
  input  logic                   train_en,
  input  logic                   train_bit,
  input  logic                   g_load,
  input  logic signed [XY_W-1:0] g_ext_x [doqpsk_pkg::N_BRANCH],
  input  logic signed [XY_W-1:0] g_ext_y [doqpsk_pkg::N_BRANCH],
  output logic signed [XY_W-1:0] g_x     [doqpsk_pkg::N_BRANCH],
  output logic signed [XY_W-1:0] g_y     [doqpsk_pkg::N_BRANCH],
  output logic                   train_update,
  // bit-rate statistics and decoded bits
  output logic signed [XY_W-1:0] x_bit,
  output logic signed [XY_W-1:0] y_bit,
  output logic                   xy_valid,
  output logic                   outbit,
  output logic                   outbit_valid
);
  import doqpsk_pkg::*;

  logic signed [XY_W-1:0] x_fast, y_fast;
  logic                   xy_fast_valid;
  logic signed [XY_W-1:0] g_reg_x [N_BRANCH];
  logic signed [XY_W-1:0] g_reg_y [N_BRANCH];
  logic signed [XY_W-1:0] g_tr_x  [N_BRANCH];
  logic signed [XY_W-1:0] g_tr_y  [N_BRANCH];

  doqpsk_demod #(.IN_W(IN_W), .OUT_W(XY_W), .T(T), .D(D), .OUT_SHIFT(DEMOD_SHIFT)) u_demod (
    .clk, .rst_n, .if_valid, .if_sample, .x(x_fast), .y(y_fast), .xy_valid(xy_fast_valid));

  downsampler #(.W(XY_W), .FACTOR(T)) u_down (
    .clk, .rst_n, .in_valid(xy_fast_valid), .x_in(x_fast), .y_in(y_fast),
    .phase(sample_phase), .x_out(x_bit), .y_out(y_bit), .out_valid(xy_valid));

  gravity_trainer #(.XY_W(XY_W), .AVG_SHIFT(AVG_SHIFT)) u_trainer (
    .clk, .rst_n, .in_valid(xy_valid), .x(x_bit), .y(y_bit), .train_en, .train_bit,
    .gx(g_tr_x), .gy(g_tr_y), .update(train_update));

  // off-line centres
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_BRANCH); i++) begin
        g_reg_x[i] <= '0;
        g_reg_y[i] <= '0;
      end
    end else if (g_load) begin
      g_reg_x <= g_ext_x;
      g_reg_y <= g_ext_y;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N_BRANCH); i++) begin
      g_x[i] = use_trained ? g_tr_x[i] : g_reg_x[i];
      g_y[i] = use_trained ? g_tr_y[i] : g_reg_y[i];
    end
  end

  viterbi #(.XY_W(XY_W), .M_W(M_W), .PM_W(PM_W), .METRIC_SHIFT(METRIC_SHIFT),
            .SMU_DEPTH(SMU_DEPTH)) u_va (
    .clk, .rst_n, .in_valid(xy_valid), .x(x_bit), .y(y_bit), .gx(g_x), .gy(g_y),
    .outbit, .out_valid(outbit_valid));

endmodule

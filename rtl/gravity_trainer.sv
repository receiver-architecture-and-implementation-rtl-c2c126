// gravity_trainer: learns the 16 centres of gravity (g_i,X, g_i,Y) used by the
// branch metric unit.
//
// While `train_en` is high, a known trellis bit `train_bit` accompanies every
// (X, Y) pair.  The trainer keeps the last three known bits (the trellis
// state, newest in the MSB), forms the quadruple index 15 - {bit, state}, the
// same labelling as the decoder's trellis, and moves that quadruple's centre
// towards the received pair:
//   acc_i <= acc_i + s - acc_i / 2**AVG_SHIFT,   g_i = acc_i / 2**AVG_SHIFT,
// a running mean over about 2**AVG_SHIFT occurrences that also tracks a slowly
// changing channel.  That the centres are the mean received statistic of
// each quadruple, learnt in real time or off line, is the receiver's; the
// running-mean form, AVG_SHIFT and the three-bit warm-up after `train_en`
// rises (until the state holds known bits) are this design's choices.
//
// Interface: one pair per clock at most, with `in_valid` high; the centres
// are registered and change one clock after an update.  Reset sets every
// centre to 0.
module gravity_trainer #(
  parameter int unsigned XY_W      = 9,
  parameter int unsigned AVG_SHIFT = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [XY_W-1:0] x,
  input  logic signed [XY_W-1:0] y,
  input  logic                   train_en,
  input  logic                   train_bit,
  output logic signed [XY_W-1:0] gx [doqpsk_pkg::N_BRANCH],
  output logic signed [XY_W-1:0] gy [doqpsk_pkg::N_BRANCH],
  output logic                   update     // pulses for each centre update
);
  import doqpsk_pkg::*;

  localparam int unsigned ACC_W = XY_W + AVG_SHIFT;

  logic signed [ACC_W-1:0] acc_x [N_BRANCH];
  logic signed [ACC_W-1:0] acc_y [N_BRANCH];
  state_t                  hist;
  logic [1:0]              warm;     // known bits held in hist, saturating at 3
  logic [3:0]              idx;

  assign idx = branch_index(train_bit, hist);

  function automatic logic signed [ACC_W-1:0] step(input logic signed [ACC_W-1:0] acc,
                                                   input logic signed [XY_W-1:0]  s);
    logic signed [ACC_W:0] t;
    t = (ACC_W+1)'(acc) + (ACC_W+1)'(s) - (ACC_W+1)'(acc >>> AVG_SHIFT);
    return t[ACC_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_BRANCH); i++) begin
        acc_x[i] <= '0;
        acc_y[i] <= '0;
      end
      hist   <= '0;
      warm   <= '0;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (!train_en) begin
        warm <= '0;
      end else if (in_valid) begin
        hist <= {train_bit, hist[2:1]};
        if (warm != 2'd3) begin
          warm <= warm + 2'd1;
        end else begin
          acc_x[idx] <= step(acc_x[idx], x);
          acc_y[idx] <= step(acc_y[idx], y);
          update     <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N_BRANCH); i++) begin
      gx[i] = XY_W'(acc_x[i] >>> AVG_SHIFT);
      gy[i] = XY_W'(acc_y[i] >>> AVG_SHIFT);
    end
  end

endmodule

// smu: survivor memory unit, register-exchange form.
//
// Each state s keeps the last DEPTH trellis bits of its survivor path.  On a
// trellis step the survivor of s becomes the survivor of its selected
// predecessor {s[1:0], sel[s]}, shifted by one place, with the new bit s[2]
// entering at position 0.  The decoded bit is the oldest bit (position
// DEPTH-1) of the survivor of the best state `maxmem`, relying on survivors
// having merged within DEPTH steps.  The unit's role, its `sel`/`maxmem`
// inputs and its single output bit are the receiver's; register exchange
// (one step per clock, no trace-back pass) and DEPTH = 20 (over six times
// the trellis memory of 3) are this design's choices.
//
// Interface: a step is taken when `in_valid` is high; `outbit` is the bit of
// the trellis step DEPTH-1 steps before this one and is valid, with
// `out_valid` high, one clock later.  Reset clears all survivors.
module smu #(
  parameter int unsigned DEPTH = 20
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [doqpsk_pkg::N_STATES-1:0]   sel,
  input  doqpsk_pkg::state_t                maxmem,
  output logic                              outbit,
  output logic                              out_valid
);
  import doqpsk_pkg::*;

  logic [DEPTH-1:0] surv      [N_STATES];
  logic [DEPTH-1:0] surv_next [N_STATES];

  always_comb begin
    for (int s = 0; s < int'(N_STATES); s++) begin
      state_t p;
      p = pred_state(2'(s), sel[s]);
      surv_next[s] = {surv[p][DEPTH-2:0], s[2]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(N_STATES); s++) surv[s] <= '0;
      outbit    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        surv   <= surv_next;
        outbit <= surv_next[maxmem][DEPTH-1];
      end
    end
  end

endmodule

// doqpsk_pkg: constants and helper functions shared by the DOQPSK receiver.
//
// The Viterbi decoder works on an 8-state trellis whose state is the last three
// trellis bits, newest bit in the MSB.  A transition from state p on new bit b
// leads to state {b, p[2:1]} and is scored with branch metric number
// 15 - {b, p}; this labelling is read off the receiver's trellis diagram, where
// the edge 0->0 carries g15 and the edge 7->7 carries g0.
// Path metrics are kept modulo 2**PM_W and compared with a wrap-around
// comparison, which is exact as long as all live metrics lie within
// 2**(PM_W-1) of each other (see acs.sv for the bound).
package doqpsk_pkg;

  localparam int unsigned N_STATES = 8;   // trellis states
  localparam int unsigned N_BRANCH = 16;  // bit quadruples / centres of gravity
  localparam int unsigned STATE_W  = 3;

  typedef logic [STATE_W-1:0] state_t;

  // Index of the centre of gravity (and branch metric) for the transition
  // from state `pred` on new bit `b`.
  function automatic logic [3:0] branch_index(input logic b, input state_t pred);
    return 4'd15 - {b, pred};
  endfunction

  // Predecessor of a state whose two low bits are `s_low`, selected by
  // decision bit `sel`.
  function automatic state_t pred_state(input logic [1:0] s_low, input logic sel);
    return {s_low, sel};
  endfunction

endpackage

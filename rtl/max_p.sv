// max_p: finds the most likely trellis state, the one whose path metric is
// best, and gives its 3-bit number (`maxmem`) to the survivor memory.
//
// The block's name and its 3-bit output are the receiver's.  Because the path
// metrics are accumulated squared distances, "best" is the smallest.  The
// search is a three-level tree of wrap-around comparisons (the sign of the
// PM_W-bit difference, exact while the metrics lie within 2**(PM_W-1) of each
// other, which acs guarantees); on a tie the lower state number wins.
// Purely combinational.
module max_p #(
  parameter int unsigned PM_W = 10
) (
  input  logic [PM_W-1:0]          pm [doqpsk_pkg::N_STATES],
  output doqpsk_pkg::state_t       maxmem
);
  import doqpsk_pkg::*;

  // true when a is strictly better (smaller) than b, modulo 2**PM_W
  function automatic logic better(input logic [PM_W-1:0] a, input logic [PM_W-1:0] b);
    logic [PM_W-1:0] d;
    d = a - b;
    return d[PM_W-1];
  endfunction

  logic [PM_W-1:0] v1 [4];
  state_t          i1 [4];
  logic [PM_W-1:0] v2 [2];
  state_t          i2 [2];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (better(pm[2*k+1], pm[2*k])) begin
        v1[k] = pm[2*k+1]; i1[k] = state_t'(2*k+1);
      end else begin
        v1[k] = pm[2*k];   i1[k] = state_t'(2*k);
      end
    end
    for (int k = 0; k < 2; k++) begin
      if (better(v1[2*k+1], v1[2*k])) begin
        v2[k] = v1[2*k+1]; i2[k] = i1[2*k+1];
      end else begin
        v2[k] = v1[2*k];   i2[k] = i1[2*k];
      end
    end
    maxmem = better(v2[1], v2[0]) ? i2[1] : i2[0];
  end

endmodule

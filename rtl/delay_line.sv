// delay_line: fixed delay of DEPTH enabled samples for a WIDTH-bit word.
//
// A plain shift register: on every clock with `en` high the input enters and
// every stage moves one place, so `dout` is the input of DEPTH enables ago.
// Reset clears all stages to zero.  Used for the correlator lags of the
// bandpass demodulator.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= din;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule

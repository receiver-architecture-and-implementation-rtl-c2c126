// downsampler: keeps one (X, Y) pair in FACTOR so the Viterbi decoder runs at
// bit rate.
//
// A modulo-FACTOR counter advances with every valid input pair; the pair that
// arrives while the counter equals `phase` is registered and marked with
// `out_valid`.  The factor of 8 (32 MHz samples to 4 Mbit/s) is the
// receiver's; choosing the sampling instant with a static `phase` input is
// this design's choice, since no symbol timing recovery is specified.
// Output appears one clock after the selected input.
module downsampler #(
  parameter int unsigned W      = 9,
  parameter int unsigned FACTOR = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [W-1:0]           x_in,
  input  logic signed [W-1:0]           y_in,
  input  logic [$clog2(FACTOR)-1:0]     phase,
  output logic signed [W-1:0]           x_out,
  output logic signed [W-1:0]           y_out,
  output logic                          out_valid
);

  logic [$clog2(FACTOR)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      x_out     <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= (cnt == $clog2(FACTOR)'(FACTOR - 1)) ? '0 : cnt + 1'b1;
        if (cnt == phase) begin
          x_out     <= x_in;
          y_out     <= y_in;
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule

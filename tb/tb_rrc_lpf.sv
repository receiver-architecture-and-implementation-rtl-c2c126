// tb_rrc_lpf: self-checking test of the root raised cosine FIR.
//
// The coefficients are recomputed here from the closed-form rolloff-1 root
// raised cosine, the filter is fed random samples (random amplitudes, so
// saturation occurs too) with random gaps in `en`, and every output is
// compared with a convolution over the samples sent.  The output must appear
// exactly two clocks after its last input sample.
module tb_rrc_lpf;
  localparam int NT = 33, IN_W = 16, OUT_W = 9, SHIFT = 18;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IN_W-1:0]  din = '0;
  logic signed [OUT_W-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  int coef [NT];
  longint hist [$];
  int en_cycle [$];
  int cycle = 0;

  rrc_lpf dut (.clk, .rst_n, .en, .din, .dout, .dout_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rrc(input real t);
    real u;
    u = t / 16.0;
    if (u == 0.25 || u == -0.25) return 1.0;
    return 4.0 * $cos(2.0 * PI * u) / (PI * (1.0 - 16.0 * u * u));
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  initial begin
    for (int i = 0; i < NT; i++) coef[i] = rnd(rrc(real'(i - 16)) / rrc(0.0) * 511.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // impulse first: the response must reproduce the coefficients (scaled)
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) < 7);
      if (n == 0) begin en = 1'b1; din = 16'sd32767; end
      else if (n < 40) din = '0;
      else din = IN_W'($signed($urandom) >>> $urandom_range(16, 29));
      if (en) begin hist.push_back(longint'(din)); en_cycle.push_back(cycle); end
    end
    @(negedge clk) en = 1'b0;
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: every output belongs to the next unmatched input sample
  int k = 0;
  always @(posedge clk) if (rst_n && dout_valid) begin
    longint acc;
    int exp_v;
    acc = 0;
    for (int i = 0; i < NT; i++)
      if (k - i >= 0) acc += longint'(coef[i]) * hist[k-i];
    acc = acc >>> SHIFT;
    if (acc > 255) acc = 255;
    if (acc < -256) acc = -256;
    exp_v = int'(acc);
    checks++;
    if (int'(dout) != exp_v || cycle - en_cycle[k] != 2) begin
      failures++;
      if (failures < 10) $display("mismatch k=%0d got %0d exp %0d lat %0d", k, dout, exp_v, cycle - en_cycle[k]);
    end
    k++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

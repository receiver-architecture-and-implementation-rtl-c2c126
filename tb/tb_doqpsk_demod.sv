// tb_doqpsk_demod: self-checking test of the bandpass differential
// demodulator.
//
// Random 8-bit IF samples are fed (mostly every clock, with some gaps).  The
// reference multiplies each sample by the one 13 samples earlier (X branch,
// D + T/2) and by the one 9 samples earlier (Y branch, D), filters both with
// root raised cosine coefficients recomputed here from the closed form, and
// scales by 2**-18 with saturation to 9 bits.  Each output pair must match
// and appear three clocks after the sample that completes it.
module tb_doqpsk_demod;
  localparam int NT = 33;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, if_valid = 1'b0;
  logic signed [7:0] if_sample = '0;
  logic signed [8:0] x, y;
  logic xy_valid;
  int checks = 0, failures = 0, cycle = 0, k = 0;
  int coef [NT];
  int smp [$];
  int smp_cycle [$];

  doqpsk_demod dut (.clk, .rst_n, .if_valid, .if_sample, .x, .y, .xy_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rrc(input real t);
    real u;
    u = t / 16.0;
    if (u == 0.25 || u == -0.25) return 1.0;
    return 4.0 * $cos(2.0 * PI * u) / (PI * (1.0 - 16.0 * u * u));
  endfunction

  function automatic int s_at(input int n);
    return (n >= 0) ? smp[n] : 0;
  endfunction

  function automatic int branch(input int n, input int lag);
    longint acc;
    acc = 0;
    for (int i = 0; i < NT; i++)
      if (n - i >= 0) acc += longint'(coef[i]) * s_at(n - i) * s_at(n - i - lag);
    acc = acc >>> 18;
    if (acc > 255) acc = 255;
    if (acc < -256) acc = -256;
    return int'(acc);
  endfunction

  initial begin
    for (int i = 0; i < NT; i++) begin
      real v;
      v = rrc(real'(i - 16)) / rrc(0.0) * 511.0;
      coef[i] = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if_valid = (n < 1500) || ($urandom_range(0, 5) != 0);
      // large and small amplitudes, so both saturation and fine values occur
      if_sample = 8'($signed($urandom) >>> ((n / 500) % 2 == 0 ? 24 : 26));
      if (if_valid) begin smp.push_back(int'(if_sample)); smp_cycle.push_back(cycle); end
    end
    @(negedge clk) if_valid = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (k != smp.size()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && xy_valid) begin
    int ex, ey;
    ex = branch(k, 13);
    ey = branch(k, 9);
    checks++;
    if (int'(x) != ex || int'(y) != ey || cycle - smp_cycle[k] != 3) begin
      failures++;
      if (failures < 10) $display("k=%0d x %0d/%0d y %0d/%0d lat %0d", k, x, ex, y, ey, cycle - smp_cycle[k]);
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

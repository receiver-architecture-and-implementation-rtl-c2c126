// tb_viterbi: self-checking test of the complete 8-state decoder.
//
// Sixteen random centres of gravity are chosen; a random trellis bit stream
// b[k] is sent as the centre of its quadruple 15 - (8*b[k] + 4*b[k-1] +
// 2*b[k-2] + b[k-3]) plus small random noise.  Every decoded bit must equal
// the bit sent 19 (survivor depth - 1) trellis steps earlier, and must
// appear exactly three clocks after the step that releases it.  A second
// phase adds noise comparable to half the centre spacing and only counts the
// errors, which must stay rare.
module tb_viterbi;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [8:0] x = '0, y = '0;
  logic signed [8:0] gx [16], gy [16];
  logic outbit, out_valid;
  int checks = 0, failures = 0;
  int bits [$];
  int in_cycle [$];
  int cycle = 0, nout = 0, noisy_err = 0, noisy_n = 0;
  int noise_amp = 3;

  viterbi dut (.clk, .rst_n, .in_valid, .x, .y, .gx, .gy, .outbit, .out_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int noise(input int a);
    return $urandom_range(0, 2 * a) - a;
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      gx[i] = 9'($urandom_range(0, 15) * 30 - 225);
      gy[i] = 9'(((i * 7) % 16) * 30 - 225);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      int b, q, n;
      if (k == 2000) noise_amp = 18;
      // one step every 1..8 clocks
      repeat ($urandom_range(0, 7)) @(negedge clk) in_valid = 1'b0;
      @(negedge clk);
      b = $urandom_range(0, 1);
      bits.push_back(b);
      n = bits.size();
      q = 8 * b;
      if (n > 1) q += 4 * bits[n-2];
      if (n > 2) q += 2 * bits[n-3];
      if (n > 3) q += bits[n-4];
      x = 9'(int'(gx[15 - q]) + noise(noise_amp));
      y = 9'(int'(gy[15 - q]) + noise(noise_amp));
      in_valid = 1'b1;
      in_cycle.push_back(cycle);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(posedge clk);
    $display("noisy phase: %0d errors in %0d bits", noisy_err, noisy_n);
    checks++;
    if (noisy_n < 1900 || noisy_err * 20 > noisy_n) failures++;
    checks++;
    if (nout != 4000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int k;
    k = nout - 19;    // step whose bit is released
    checks++;
    if (cycle - in_cycle[nout] != 3) failures++;
    if (nout >= 24 && nout < 2000) begin
      checks++;
      if (int'(outbit) != bits[k]) begin
        failures++;
        if (failures < 10) $display("step %0d got %0d exp %0d", k, outbit, bits[k]);
      end
    end else if (nout >= 2030) begin
      noisy_n++;
      if (int'(outbit) != bits[k]) noisy_err++;
    end
    nout++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

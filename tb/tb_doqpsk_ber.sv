// tb_doqpsk_ber: bit error rate of the receiver against signal-to-noise ratio.
//
// Same DOQPSK transmitter model as tb_doqpsk_rx (differential encoding
// a[k] = a[k-1] ^ d[k] ^ (k & 1), OQPSK rails shaped by the rolloff-1 root
// raised cosine, 8 MHz carrier at 32 MHz), now with Gaussian noise.  The
// noise is generated as white complex baseband noise, shaped by the same root
// raised cosine and put on the carrier, so it occupies the 6-10 MHz band of
// the signal, as after the receiver's IF bandpass filter.  The SNR axis is
// Eb/N0: Eb = signal power x 8 samples per bit, N0 = one-sided noise density
// at the carrier, sigma^2 * (sum of h)^2 for white rail noise of variance
// sigma^2 shaped by h.  (The in-band signal-to-noise power ratio is 3 dB
// higher, because the noise bandwidth of the filter, 2 MHz, is half the bit
// rate.)
//
// For each SNR point the receiver is reset, trained in real time on
// N_TRAIN known bits (statistic-to-bit delay J = 2 bits and sampling phase 7,
// as found by tb_doqpsk_rx) and then decodes N_DEC bits; errors are counted
// against the data bits.  Checks: the BER must fall as the SNR rises and be
// below 1e-2 at the highest point.  The printed BERs can be set beside the
// published curve of this receiver (about 1e-3 at 12 dB and 1e-4 near
// 13.6 dB), keeping in mind that its SNR definition may differ.
module tb_doqpsk_ber;
  localparam real PI = 3.14159265358979;
  localparam int  PHASE = 7, J = 2;
  localparam int  N_TRAIN = 1500, N_DEC = 20000, NPTS = 4;
  localparam int  NBITS = N_TRAIN + N_DEC + 100;
  localparam real SNR_DB [NPTS] = '{8.0, 10.0, 12.0, 14.0};

  logic clk = 1'b0, rst_n = 1'b0, if_valid = 1'b0;
  logic signed [7:0] if_sample = '0;
  logic [2:0] sample_phase = 3'(PHASE);
  logic use_trained = 1'b1, train_en = 1'b0, train_bit, g_load = 1'b0;
  logic signed [8:0] g_ext_x [16], g_ext_y [16], g_x [16], g_y [16];
  logic train_update;
  logic signed [8:0] x_bit, y_bit;
  logic xy_valid, outbit, outbit_valid;

  int checks = 0, failures = 0;
  int d [NBITS], a [NBITS];
  real h [33], wn_i [33], wn_q [33];
  real sigma, ps;
  int m = 0, nout = 0, errors = 0, counted = 0, count_from = 1 << 30;
  real ber [NPTS];

  doqpsk_rx dut (.clk, .rst_n, .if_valid, .if_sample, .sample_phase, .use_trained,
                 .train_en, .train_bit, .g_load, .g_ext_x, .g_ext_y, .g_x, .g_y,
                 .train_update, .x_bit, .y_bit, .xy_valid, .outbit, .outbit_valid);

  always #5 clk = ~clk;

  function automatic real rrc(input real t);
    real u;
    u = t / 16.0;
    if (u == 0.25 || u == -0.25) return 1.0;
    return 4.0 * $cos(2.0 * PI * u) / (PI * (1.0 - 16.0 * u * u));
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic real carrier(input int n, input real i_v, input real q_v);
    case (n % 4)
      0: return i_v;
      1: return -q_v;
      2: return -i_v;
      default: return q_v;
    endcase
  endfunction

  function automatic real tx_clean(input int n);
    real i_v, q_v;
    i_v = 0.0; q_v = 0.0;
    for (int k = (n - 32) / 8 - 1; k <= n / 8; k++)
      if (k >= 0 && k < NBITS && n - 8 * k >= 0 && n - 8 * k <= 32) begin
        if (k % 2 == 0) i_v += (1 - 2 * a[k]) * h[n - 8 * k];
        else            q_v += (1 - 2 * a[k]) * h[n - 8 * k];
      end
    return carrier(n, i_v, q_v);
  endfunction

  // shaped noise sample n (advances the white-noise history)
  function automatic real tx_noise(input int n);
    real ni, nq;
    for (int i = 32; i > 0; i--) begin wn_i[i] = wn_i[i-1]; wn_q[i] = wn_q[i-1]; end
    wn_i[0] = sigma * gauss();
    wn_q[0] = sigma * gauss();
    ni = 0.0; nq = 0.0;
    for (int i = 0; i < 33; i++) begin ni += h[i] * wn_i[i]; nq += h[i] * wn_q[i]; end
    return carrier(n, ni, nq);
  endfunction

  always_comb train_bit = (m - J >= 0) ? d[m - J][0] : 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (xy_valid) m <= m + 1;
    if (outbit_valid) begin
      int k;
      k = nout - 19 - J;
      if (nout >= count_from && k >= 0 && k < NBITS) begin
        counted++;
        if (int'(outbit) != d[k]) errors++;
      end
      nout <= nout + 1;
    end
  end

  initial begin
    real hs;
    for (int i = 0; i < 16; i++) begin g_ext_x[i] = '0; g_ext_y[i] = '0; end
    for (int i = 0; i < 33; i++) h[i] = rrc(real'(i - 16)) / rrc(0.0);
    hs = 0.0;
    for (int i = 0; i < 33; i++) hs += h[i];
    for (int p = 0; p < NPTS; p++) begin
      for (int k = 0; k < NBITS; k++) begin
        d[k] = $urandom_range(0, 1);
        a[k] = (k == 0) ? d[k] : (a[k-1] ^ d[k] ^ (k & 1));
      end
      ps = 0.0;
      for (int n = 0; n < 8000; n++) ps += tx_clean(n) ** 2;
      ps /= 8000.0;
      // Eb/N0 = 8 * ps / (sigma^2 * (sum h)^2)
      sigma = $sqrt(8.0 * ps / (10.0 ** (SNR_DB[p] / 10.0))) / hs;
      for (int i = 0; i < 33; i++) begin wn_i[i] = 0.0; wn_q[i] = 0.0; end
      rst_n = 1'b0; if_valid = 1'b0; train_en = 1'b0;
      m = 0; nout = 0; errors = 0; counted = 0; count_from = 1 << 30;
      repeat (3) @(posedge clk);
      @(negedge clk) begin rst_n = 1'b1; train_en = 1'b1; end
      for (int n = 0; n < 8 * NBITS; n++) begin
        real s;
        int v;
        if (n == 8 * N_TRAIN) begin train_en = 1'b0; count_from = nout + 40; end
        s = 100.0 * (tx_clean(n) + tx_noise(n));
        v = (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        if_sample = 8'(v);
        if_valid = 1'b1;
        @(negedge clk);
      end
      if_valid = 1'b0;
      repeat (10) @(negedge clk);
      ber[p] = real'(errors) / real'(counted);
      $display("Eb/N0 %4.1f dB: %0d errors in %0d bits, BER %e", SNR_DB[p], errors, counted, ber[p]);
      checks++;
      if (counted < N_DEC - 200) failures++;
    end
    for (int p = 1; p < NPTS; p++) begin
      checks++;
      if (ber[p] > ber[p-1] && ber[p] > 0.0) failures++;
    end
    checks++;
    if (ber[NPTS-1] > 1.0e-2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * (8 * NBITS + 100)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

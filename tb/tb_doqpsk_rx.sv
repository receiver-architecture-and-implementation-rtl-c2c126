// tb_doqpsk_rx: end-to-end test of the DOQPSK receiver at its default sizes.
//
// A DOQPSK transmitter model drives the receiver with 8-bit IF samples:
// random data bits d[k] are differentially encoded as
// a[k] = a[k-1] ^ d[k] ^ (k & 1) (the parity term undoes the alternation of
// sign between the I and Q rails, so the receiver statistic depends on d
// alone), a[k] goes to I for even k and to Q for odd k with an offset of one
// bit (T = 8 samples), both rails are shaped with the rolloff-1 root raised
// cosine (symbol 16 samples) and put on an 8 MHz carrier sampled at 32 MHz,
// i.e. I, -Q, -I, Q repeating, plus +-2 LSB of random noise.
//
// Phases (each mechanism is counted and must occur):
//  A  calibration: the bit-rate (X, Y) pairs are recorded and the bit delay
//     J between data and statistic is taken as the one whose 16 quadruple
//     clusters are tightest; their spread must be small (the demodulator
//     separates the quadruples);
//  B  real-time training with the known bits d[m-J] (`train_en`,
//     `use_trained` = 1);
//  C  decoding with the learnt centres: every decoded bit must equal the
//     data bit sent, SMU_DEPTH-1 = 19 bit periods earlier;
//  D  the learnt centres are read back, loaded through the off-line port
//     (`g_load`), the source is switched to it (`use_trained` = 0), the
//     trainer is then fed wrong bits for 200 bits, and decoding with the
//     loaded bank must still be error-free;
//  and the decoded bit rate must be one bit per 8 clocks.
module tb_doqpsk_rx;
  localparam real PI = 3.14159265358979;
  localparam int  PHASE = 7;
  localparam int  N_CAL = 600, N_TRAIN = 1500, N_DEC = 1500, N_OFF = 1000;
  localparam int  NBITS = N_CAL + N_TRAIN + N_DEC + N_OFF + 240;

  logic clk = 1'b0, rst_n = 1'b0, if_valid = 1'b0;
  logic signed [7:0] if_sample = '0;
  logic [2:0] sample_phase = 3'(PHASE);
  logic use_trained = 1'b0, train_en = 1'b0, train_bit, g_load = 1'b0;
  logic signed [8:0] g_ext_x [16], g_ext_y [16], g_x [16], g_y [16];
  logic train_update;
  logic signed [8:0] x_bit, y_bit;
  logic xy_valid, outbit, outbit_valid;

  int checks = 0, failures = 0;
  int d [NBITS], a [NBITS];
  real h [33];
  int xs [N_CAL], ys [N_CAL];
  int m = 0, nout = 0, J = -1;
  int check_from = 1 << 30, check_to = 0, dec_errors = 0, dec_checked = 0;
  int n_train = 0, n_load = 0, n_switch = 0, first_out = -1, last_out = 0, cycle = 0;

  doqpsk_rx dut (.clk, .rst_n, .if_valid, .if_sample, .sample_phase, .use_trained,
                 .train_en, .train_bit, .g_load, .g_ext_x, .g_ext_y, .g_x, .g_y,
                 .train_update, .x_bit, .y_bit, .xy_valid, .outbit, .outbit_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rrc(input real t);
    real u;
    u = t / 16.0;
    if (u == 0.25 || u == -0.25) return 1.0;
    return 4.0 * $cos(2.0 * PI * u) / (PI * (1.0 - 16.0 * u * u));
  endfunction

  // IF sample n of the transmitter
  function automatic int tx_sample(input int n);
    real i_v, q_v, s;
    int v;
    i_v = 0.0; q_v = 0.0;
    for (int k = (n - 32) / 8 - 1; k <= n / 8; k++)
      if (k >= 0 && k < NBITS && n - 8 * k >= 0 && n - 8 * k <= 32) begin
        if (k % 2 == 0) i_v += (1 - 2 * a[k]) * h[n - 8 * k];
        else            q_v += (1 - 2 * a[k]) * h[n - 8 * k];
      end
    case (n % 4)
      0: s = i_v;
      1: s = -q_v;
      2: s = -i_v;
      default: s = q_v;
    endcase
    s = 100.0 * s + real'($urandom_range(0, 4)) - 2.0;
    v = (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  logic scramble = 1'b0;   // feed the trainer wrong bits
  always_comb train_bit = scramble ? ~d[m][0] ^ d[m / 3][0] : ((J >= 0 && m - J >= 0) ? d[m - J][0] : 1'b0);

  always @(posedge clk) if (rst_n) begin
    if (xy_valid) begin
      if (m < N_CAL) begin xs[m] = int'(x_bit); ys[m] = int'(y_bit); end
      m <= m + 1;
    end
    if (train_update) n_train++;
    if (outbit_valid) begin
      int k;
      if (first_out < 0) first_out = cycle;
      last_out = cycle;
      k = nout - 19 - J;
      if (nout >= check_from && nout < check_to && k >= 0) begin
        dec_checked++;
        if (int'(outbit) != d[k]) dec_errors++;
      end
      nout <= nout + 1;
    end
  end

  task automatic wait_bits(input int nb);
    int target;
    target = m + nb;
    while (m < target) @(posedge clk);
  endtask

  // spread of the 16 quadruple clusters when the statistic is aligned to d[m-j]
  function automatic real spread(input int j);
    real sx [16], sy [16], sxx, tot_m, tot_v, mx, my;
    int cnt [16], q;
    for (int i = 0; i < 16; i++) begin sx[i] = 0; sy[i] = 0; cnt[i] = 0; end
    sxx = 0; mx = 0; my = 0;
    for (int n = 40; n < N_CAL; n++) begin
      q = 8 * d[n - j] + 4 * d[n - j - 1] + 2 * d[n - j - 2] + d[n - j - 3];
      sx[q] += xs[n]; sy[q] += ys[n]; cnt[q]++;
      mx += xs[n]; my += ys[n];
    end
    mx /= (N_CAL - 40); my /= (N_CAL - 40);
    tot_m = 0; tot_v = 0;
    for (int n = 40; n < N_CAL; n++) begin
      q = 8 * d[n - j] + 4 * d[n - j - 1] + 2 * d[n - j - 2] + d[n - j - 3];
      tot_m += (xs[n] - sx[q] / cnt[q]) ** 2 + (ys[n] - sy[q] / cnt[q]) ** 2;
      tot_v += (xs[n] - mx) ** 2 + (ys[n] - my) ** 2;
    end
    return tot_m / tot_v;
  endfunction

  // transmitter: one sample per clock
  initial begin
    for (int i = 0; i < 33; i++) h[i] = rrc(real'(i - 16)) / rrc(0.0);
    for (int k = 0; k < NBITS; k++) begin
      d[k] = $urandom_range(0, 1);
      a[k] = (k == 0) ? d[k] : (a[k-1] ^ d[k] ^ (k & 1));
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 8 * NBITS; n++) begin
      if_sample = 8'(tx_sample(n));
      if_valid  = 1'b1;
      @(negedge clk);
    end
    if_valid = 1'b0;
  end

  // control
  initial begin
    real best, sp;
    for (int i = 0; i < 16; i++) begin g_ext_x[i] = '0; g_ext_y[i] = '0; end
    wait (rst_n);
    // A: calibration
    wait_bits(N_CAL + 1);
    best = 1.0e9;
    for (int j = 0; j < 30; j++) begin
      sp = spread(j);
      if (sp < best) begin best = sp; J = j; end
    end
    $display("alignment: statistic follows data bit by J=%0d, cluster spread %f of total", J, best);
    checks++;
    if (best > 0.02) failures++;
    // B: real-time training
    @(negedge clk) begin train_en = 1'b1; use_trained = 1'b1; n_switch++; end
    wait_bits(N_TRAIN);
    @(negedge clk) train_en = 1'b0;
    // C: decode with the learnt centres
    wait_bits(40);
    check_from = nout; check_to = nout + N_DEC - 40;
    wait_bits(N_DEC - 40);
    $display("trained centres: %0d errors in %0d bits", dec_errors, dec_checked);
    checks++;
    if (dec_errors != 0 || dec_checked < N_DEC - 100) failures++;
    // D: off-line load of the same centres and switch of source
    @(negedge clk) begin
      for (int i = 0; i < 16; i++) begin g_ext_x[i] = g_x[i]; g_ext_y[i] = g_y[i]; end
      g_load = 1'b1; n_load++;
    end
    @(negedge clk) begin g_load = 1'b0; use_trained = 1'b0; n_switch++; end
    // the trainer now learns from wrong bits; the loaded bank must not care
    @(negedge clk) begin train_en = 1'b1; scramble = 1'b1; end
    wait_bits(200);
    @(negedge clk) begin train_en = 1'b0; scramble = 1'b0; end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (g_x[i] != g_ext_x[i] || g_y[i] != g_ext_y[i]) failures++;
    end
    dec_errors = 0; dec_checked = 0;
    wait_bits(40);
    check_from = nout; check_to = nout + N_OFF - 60;
    wait_bits(N_OFF - 60);
    $display("loaded centres: %0d errors in %0d bits", dec_errors, dec_checked);
    checks++;
    if (dec_errors != 0 || dec_checked < N_OFF - 120) failures++;
    // rate: one decoded bit per 8 clocks
    checks++;
    if ((last_out - first_out) != 8 * (nout - 1)) begin
      failures++;
      $display("rate: %0d outputs over %0d clocks", nout, last_out - first_out);
    end
    $display("mechanisms: training updates %0d, off-line loads %0d, source switches %0d, decoded bits %0d",
             n_train, n_load, n_switch, nout);
    checks += 3;
    if (n_train == 0) failures++;
    if (n_load == 0) failures++;
    if (n_switch < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * NBITS + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

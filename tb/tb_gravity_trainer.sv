// tb_gravity_trainer: self-checking test of the centre-of-gravity trainer.
//
// Random known bits are sent with (X, Y) = true centre of their quadruple
// plus zero-mean noise.  The test checks (1) that every centre matches an
// integer model of the running mean acc += s - floor(acc/8), (2) that the
// first three pairs after training starts update nothing, (3) that nothing
// changes while training is off, and (4) that at the end every learnt
// centre is within 6 of the true one (noise is +-10, the
// running mean spans about 8 samples).
module tb_gravity_trainer;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, train_en = 1'b0, train_bit = 1'b0;
  logic signed [8:0] x = '0, y = '0;
  logic signed [8:0] gx [16], gy [16];
  logic update;
  int checks = 0, failures = 0, updates = 0, exp_updates = 0;
  int tx [16], ty [16], ax [16], ay [16];
  int hist [$];

  gravity_trainer dut (.clk, .rst_n, .in_valid, .x, .y, .train_en, .train_bit, .gx, .gy, .update);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && update) updates++;

  function automatic int fdiv8(input int a);
    return (a >= 0) ? a / 8 : -((-a + 7) / 8);
  endfunction

  task automatic compare(input string what);
    for (int i = 0; i < 16; i++) begin
      checks += 2;
      if (int'(gx[i]) != fdiv8(ax[i])) begin failures++; if (failures < 10) $display("%s gx%0d %0d exp %0d", what, i, gx[i], fdiv8(ax[i])); end
      if (int'(gy[i]) != fdiv8(ay[i])) begin failures++; if (failures < 10) $display("%s gy%0d %0d exp %0d", what, i, gy[i], fdiv8(ay[i])); end
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      tx[i] = $urandom_range(0, 400) - 200; ty[i] = $urandom_range(0, 400) - 200;
      ax[i] = 0; ay[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 3; phase++) begin
      int seen;
      seen = 0;
      train_en = (phase != 1);
      for (int n = 0; n < 1500; n++) begin
        @(negedge clk);
        if (n > 0) compare("step");
        in_valid = ($urandom_range(0, 2) != 0);
        if (in_valid) begin
          int b, q, sz;
          b = $urandom_range(0, 1);
          train_bit = b[0];
          if (train_en) begin
            hist.push_back(b);
            sz = hist.size();
            q = 15 - (8 * b + (sz > 1 ? 4 * hist[sz-2] : 0) + (sz > 2 ? 2 * hist[sz-3] : 0) + (sz > 3 ? hist[sz-4] : 0));
            x = 9'(tx[q] + $urandom_range(0, 20) - 10);
            y = 9'(ty[q] + $urandom_range(0, 20) - 10);
            if (seen >= 3) begin
              ax[q] = ax[q] + int'(x) - fdiv8(ax[q]);
              ay[q] = ay[q] + int'(y) - fdiv8(ay[q]);
              exp_updates++;
            end
            seen++;
          end else begin
            x = 9'($urandom); y = 9'($urandom);
          end
        end
      end
      @(negedge clk) in_valid = 1'b0;
      hist.delete();
      @(negedge clk);
    end
    compare("final");
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(gx[i]) > tx[i] + 6 || gx[i] < tx[i] - 6 || gy[i] > ty[i] + 6 || gy[i] < ty[i] - 6) begin
        failures++;
        $display("centre %0d learnt (%0d,%0d) true (%0d,%0d)", i, gx[i], gy[i], tx[i], ty[i]);
      end
    end
    checks++;
    if (updates != exp_updates) begin failures++; $display("updates %0d exp %0d", updates, exp_updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

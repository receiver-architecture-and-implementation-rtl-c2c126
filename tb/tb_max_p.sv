// tb_max_p: self-checking test of the best-state search.
//
// Eight path metrics are drawn as a random base (anywhere in the 10-bit
// wrap-around range) plus offsets below 2**9, so the unwrapped values are
// known; the expected state is the lowest-numbered state with the smallest
// unwrapped metric.  Ties are forced in part of the vectors.
module tb_max_p;
  logic [9:0] pm [8];
  logic [2:0] maxmem;
  int checks = 0, failures = 0;

  max_p dut (.pm, .maxmem);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int base, off [8], best;
      base = $urandom_range(0, 1023);
      for (int s = 0; s < 8; s++) begin
        off[s] = (n % 3 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 381);
        pm[s]  = 10'(base + off[s]);
      end
      best = 0;
      for (int s = 1; s < 8; s++) if (off[s] < off[best]) best = s;
      #1;
      checks++;
      if (int'(maxmem) != best) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d exp %0d", n, maxmem, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_downsampler: self-checking test of the down-by-8 stage.
//
// A counting sequence is fed with random gaps; for each sampling phase the
// test checks that exactly every 8th valid input (the ones with index
// congruent to the phase) comes out, one clock after it went in, and counts
// the outputs.
module tb_downsampler;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [8:0] x_in = '0, y_in = '0, x_out, y_out;
  logic [2:0] phase = '0;
  logic out_valid;
  int checks = 0, failures = 0;

  downsampler dut (.clk, .rst_n, .in_valid, .x_in, .y_in, .phase, .x_out, .y_out, .out_valid);

  always #5 clk = ~clk;

  initial begin
    for (int ph = 0; ph < 8; ph++) begin
      int idx, outs, expect_out;
      logic exp_next;
      logic signed [8:0] exp_x;
      rst_n = 1'b0;
      in_valid = 1'b0;
      phase = 3'(ph);
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      idx = 0; outs = 0; exp_next = 1'b0; exp_x = '0;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        checks++;
        if (out_valid !== exp_next || (exp_next && (x_out != exp_x || y_out != ~exp_x))) begin
          failures++;
          if (failures < 10) $display("ph=%0d n=%0d valid %0d exp %0d x %0d exp %0d", ph, n, out_valid, exp_next, x_out, exp_x);
        end
        if (out_valid) outs++;
        in_valid = ($urandom_range(0, 2) != 0);
        x_in = 9'(idx * 3 + ph);
        y_in = ~x_in;
        exp_next = in_valid && (idx % 8 == ph);
        exp_x = x_in;
        if (in_valid) idx++;
      end
      expect_out = (idx - 1 - ph) / 8 + 1;
      checks++;
      if (outs < expect_out - 1 || outs > expect_out) begin
        failures++;
        $display("ph=%0d outputs %0d expected about %0d", ph, outs, expect_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_smu: self-checking test of the register-exchange survivor memory.
//
// Random decision vectors and random best states are applied.  The test keeps
// the whole history and computes each expected output by trace-back, an
// independent method: start at the best state of step n, follow the recorded
// decisions back DEPTH-1 steps (predecessor of s is 2*(s%4)+sel[s]) and take
// the newest bit (bit 2) of the state reached.  Outputs from the first DEPTH
// steps, which depend on the reset contents, are not checked.
module tb_smu;
  localparam int DEPTH = 20;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] sel = '0;
  logic [2:0] maxmem = '0;
  logic outbit, out_valid;
  int checks = 0, failures = 0;
  logic [7:0] sel_hist [$];
  int best_hist [$];
  logic pending = 1'b0;
  int exp_bit;

  smu dut (.clk, .rst_n, .in_valid, .sel, .maxmem, .outbit, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (!out_valid) failures++;
        if (sel_hist.size() > DEPTH) begin
          checks++;
          if (int'(outbit) != exp_bit) begin
            failures++;
            if (failures < 10) $display("n=%0d got %0d exp %0d", n, outbit, exp_bit);
          end
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      pending  = in_valid;
      if (in_valid) begin
        int s, k;
        sel    = 8'($urandom);
        maxmem = 3'($urandom);
        sel_hist.push_back(sel);
        best_hist.push_back(int'(maxmem));
        k = sel_hist.size() - 1;
        s = int'(maxmem);
        for (int j = 0; j < DEPTH - 1; j++) begin
          s = 2 * (s % 4) + int'(sel_hist[k - j][s]);
          if (k - j - 1 < 0) break;
        end
        exp_bit = s / 4;
      end
    end
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

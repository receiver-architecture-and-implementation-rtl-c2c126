// tb_bmu: self-checking test of the branch metric unit.
//
// Random received pairs and random centres (full 9-bit range and a narrow
// range, so both saturated and fine-grained metrics occur) are applied with
// random gaps; each of the 16 metrics is compared one clock later with
// min(127, ((X-gX)^2 + (Y-gY)^2) >> 7) computed here.
module tb_bmu;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [8:0] x = '0, y = '0;
  logic signed [8:0] gx [16], gy [16];
  logic [6:0] metric [16];
  logic out_valid;
  int checks = 0, failures = 0;
  int exp_m [16];
  logic pending = 1'b0;

  bmu dut (.clk, .rst_n, .in_valid, .x, .y, .gx, .gy, .metric, .out_valid);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 16; i++) begin gx[i] = '0; gy[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check the previous step
      if (pending) begin
        checks++;
        if (!out_valid) failures++;
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(metric[i]) != exp_m[i]) begin
            failures++;
            if (failures < 10) $display("n=%0d metric%0d got %0d exp %0d", n, i, metric[i], exp_m[i]);
          end
        end
      end else begin
        checks++;
        if (out_valid) failures++;
      end
      in_valid = ($urandom_range(0, 3) != 0);
      pending  = in_valid;
      if (in_valid) begin
        int sh;
        sh = (n % 2 == 0) ? 0 : 3;
        x = 9'($signed($urandom) >>> (23 + sh));
        y = 9'($signed($urandom) >>> (23 + sh));
        for (int i = 0; i < 16; i++) begin
          int dx, dy, d;
          gx[i] = 9'($signed($urandom) >>> (23 + sh));
          gy[i] = 9'($signed($urandom) >>> (23 + sh));
          dx = int'(x) - int'(gx[i]);
          dy = int'(y) - int'(gy[i]);
          d  = (dx * dx + dy * dy) >> 7;
          exp_m[i] = (d > 127) ? 127 : d;
        end
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

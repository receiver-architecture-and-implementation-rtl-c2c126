// tb_acs: self-checking test of the add-compare-select unit.
//
// Random branch metrics (0..127, ties made likely in part of the run) are
// applied for many steps.  A reference recursion with unbounded path metrics,
// written from the trellis rule (state s is reached from 2*(s%4) and
// 2*(s%4)+1 on bit s/4, branch metric number 15 - 8*(s/4) - predecessor)
// gives the expected decisions and the metrics modulo 1024.  This also
// checks that the wrap-around comparison never goes wrong over a long run.
module tb_acs;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [6:0] metric [16];
  logic [9:0] pm [8];
  logic [7:0] sel;
  logic out_valid;
  int checks = 0, failures = 0;
  longint ref_pm [8];
  logic [7:0] ref_sel;
  logic pending = 1'b0;

  acs dut (.clk, .rst_n, .in_valid, .metric, .pm, .sel, .out_valid);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 16; i++) metric[i] = '0;
    for (int s = 0; s < 8; s++) ref_pm[s] = 0;
    ref_sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (!out_valid || sel != ref_sel) failures++;
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (longint'(pm[s]) != (ref_pm[s] & 1023)) begin
            failures++;
            if (failures < 10) $display("n=%0d pm%0d got %0d exp %0d", n, s, pm[s], ref_pm[s] & 1023);
          end
        end
      end
      in_valid = ($urandom_range(0, 4) != 0);
      pending  = in_valid;
      if (in_valid) begin
        longint nxt [8];
        for (int i = 0; i < 16; i++)
          metric[i] = (n % 4 == 0) ? 7'($urandom_range(0, 2) * 63) : 7'($urandom_range(0, 127));
        for (int s = 0; s < 8; s++) begin
          int p0, p1;
          longint c0, c1;
          p0 = 2 * (s % 4);
          p1 = p0 + 1;
          c0 = ref_pm[p0] + longint'(metric[15 - 8 * (s / 4) - p0]);
          c1 = ref_pm[p1] + longint'(metric[15 - 8 * (s / 4) - p1]);
          ref_sel[s] = (c1 < c0);
          nxt[s] = (c1 < c0) ? c1 : c0;
        end
        for (int s = 0; s < 8; s++) ref_pm[s] = nxt[s];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

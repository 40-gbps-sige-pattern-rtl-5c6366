// tb_rate_divider - counts step enables over 64 clocks for each of the
// four ratios and checks the spacing between them.
module tb_rate_divider;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst;
  logic [1:0] div_sel;
  logic step_en;
  int checks = 0, failures = 0;

  rate_divider dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; div_sel = 0;
    for (int d = 0; d < 4; d++) begin
      int n, last, ratio;
      ratio = 1 << d;
      @(negedge clk); rst = 1; div_sel = 2'(d);
      @(negedge clk); rst = 0;
      n = 0; last = -1;
      for (int c = 0; c < 64; c++) begin
        #0;
        if (step_en) begin
          checks++;
          if (last >= 0 && c - last != ratio) begin
            failures++;
            $display("FAIL /%0d: enables %0d clocks apart", ratio, c - last);
          end
          if (last < 0 && c != 0) begin
            failures++;
            $display("FAIL /%0d: first enable at clock %0d", ratio, c);
          end
          last = c;
          n++;
        end
        @(negedge clk);
      end
      checks++;
      if (n != 64 / ratio) begin
        failures++;
        $display("FAIL /%0d: %0d enables in 64 clocks", ratio, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ncycle_delay - for several start counts N (0, 1, 7, 255) and a
// quarter-rate tick every 4 clocks, checks that the clock is passed
// exactly N ticks after enable rises, that it stays passed, and that
// dropping enable stops it again.
module tb_ncycle_delay;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, enable, qr_tick, clk_pass;
  logic [7:0] start_count;
  int checks = 0, failures = 0;
  logic [1:0] pre = '0;

  ncycle_delay dut (.*);

  always_ff @(posedge clk) pre <= pre + 2'd1;
  assign qr_tick = (pre == 2'd3);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int counts [4] = '{0, 1, 7, 255};
    rst = 1; enable = 0; start_count = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (counts[i]) begin
      int ticks, first_pass_ticks;
      @(negedge clk); enable = 0; start_count = 8'(counts[i]);
      repeat (3) @(negedge clk);
      checks++;
      if (clk_pass) begin failures++; $display("FAIL passes while disabled"); end
      // raise enable just after a tick so that ticks are counted from 1
      @(posedge clk iff qr_tick);
      @(negedge clk); enable = 1;
      ticks = 0; first_pass_ticks = -1;
      for (int c = 0; c < 4 * 260 + 8; c++) begin
        @(posedge clk);
        if (qr_tick) ticks++;
        #1;
        if (clk_pass && first_pass_ticks < 0) first_pass_ticks = ticks;
        if (first_pass_ticks >= 0 && !clk_pass) begin
          failures++; checks++;
          $display("FAIL N=%0d: clock stopped again", counts[i]);
          break;
        end
        @(negedge clk);
      end
      checks++;
      if (first_pass_ticks != counts[i]) begin
        failures++;
        $display("FAIL N=%0d: passed after %0d ticks", counts[i], first_pass_ticks);
      end
      @(negedge clk); enable = 0;
      @(negedge clk);
      checks++;
      if (clk_pass) begin failures++; $display("FAIL N=%0d: not stopped", counts[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vernier_delay - checks the clock delay model against the simulated
// delays of the chip: every inverter path with both verniers at code 0,
// and single/combined vernier codes 1, 128 and 255 on the zero path.
// Delays are measured between input and output rising edges.
module tb_vernier_delay;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_p = 1'b0, clk_n = 1'b1;
  logic [7:0] dac1 = '0, dac2 = '0;
  logic s1 = 1'b1, s2 = 1'b1;
  logic out_p, out_n;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  vernier_delay dut (.clk_in_p(clk_p), .clk_in_n(clk_n), .dac1(dac1), .dac2(dac2),
                     .stage1_sel(s1), .stage2_sel(s2), .clk_out_p(out_p), .clk_out_n(out_n));

  task automatic measure(input real exp_ps, input string what);
    real got;
    #500;                       // let the settings settle
    clk_p = 1'b1; clk_n = 1'b0;
    t_in = $realtime;
    @(posedge out_p);
    t_out = $realtime;
    got = t_out - t_in;
    checks++;
    if (got < exp_ps - 0.01 || got > exp_ps + 0.01) begin
      failures++;
      $display("FAIL %s: delay %f ps, expected %f ps", what, got, exp_ps);
    end
    if (out_n !== 1'b0) begin
      failures++;
      $display("FAIL %s: complementary output not low", what);
    end
    checks++;
    #500;
    clk_p = 1'b0; clk_n = 1'b1;
    #200;
  endtask

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    // inverter chain paths (Table of simulated path delays)
    s1 = 1; s2 = 1; measure(52.515, "zero inverters");
    s1 = 0; s2 = 1; measure(52.515 + 14.007, "two inverters");
    s1 = 1; s2 = 0; measure(52.515 + 30.383, "four inverters");
    s1 = 0; s2 = 0; measure(52.515 + 45.891, "six inverters");
    // vernier points on the zero path
    s1 = 1; s2 = 1;
    dac1 = 8'd1;   measure(52.515 + 0.265, "vernier1 code 1");
    dac1 = 8'd128; measure(52.515 + 0.872, "vernier1 code 128");
    dac1 = 8'd255; measure(52.515 + 4.742, "vernier1 code 255");
    dac1 = 8'd0; dac2 = 8'd255; measure(52.515 + 4.527, "vernier2 code 255");
    dac2 = 8'd128; measure(52.515 + 0.765, "vernier2 code 128");
    // midway between 128 and 255 on vernier 1: 0.872 + (4.742-0.872)*64/127
    dac2 = 8'd0; dac1 = 8'd192; measure(52.515 + 0.872 + 1.950, "vernier1 code 192");
    // everything at maximum
    s1 = 0; s2 = 0; dac1 = 8'd255; dac2 = 8'd255;
    measure(52.515 + 45.891 + 4.742 + 4.527, "maximum delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

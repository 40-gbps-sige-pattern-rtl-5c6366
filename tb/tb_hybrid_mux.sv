// tb_hybrid_mux - feeds random columns to the 128:1 multiplexer whenever
// it takes one and checks that the serial output is every column's bits
// in order, bit 0 first, one bit per enabled clock, with one column taken
// every 128 enabled clocks. Runs at the full rate and with an irregular
// step enable.
module tb_hybrid_mux;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, step_en;
  logic [COL_W-1:0] col_in;
  logic col_take, dout, dout_valid;
  int checks = 0, failures = 0;

  hybrid_mux dut (.*);

  logic exp_q [$];
  int takes = 0, steps_since_take = -1, bits_seen = 0;
  logic se_d = 1'b0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COL_W-1:0] rnd();
    logic [COL_W-1:0] w;
    for (int k = 0; k < COL_W / 32; k++) w[32*k +: 32] = $urandom;
    return w;
  endfunction

  always @(posedge clk) begin
    se_d <= step_en;
    if (!rst && se_d && dout_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output with no bit expected");
      end else begin
        logic e;
        e = exp_q.pop_front();
        if (dout !== e) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d: got %b", bits_seen, dout);
        end
      end
      bits_seen++;
    end
    if (!rst && step_en) begin
      if (col_take) begin
        if (steps_since_take >= 0 && steps_since_take != 127) begin
          failures++;
          $display("FAIL column taken after %0d steps", steps_since_take + 1);
        end
        checks++;
        steps_since_take = 0;
        takes++;
        for (int i = 0; i < COL_W; i++) exp_q.push_back(col_in[i]);
      end else if (steps_since_take >= 0) begin
        steps_since_take++;
      end
    end
  end

  // present a new column right after each take
  always @(negedge clk) begin
    if (rst || (se_d && col_take_d)) col_in = rnd();
  end
  logic col_take_d = 1'b0;
  always @(posedge clk) col_take_d <= col_take && step_en;

  initial begin
    rst = 1; step_en = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // full rate
    for (int c = 0; c < 128 * 20; c++) begin
      @(negedge clk); step_en = 1;
    end
    // irregular enable
    for (int c = 0; c < 128 * 40; c++) begin
      @(negedge clk); step_en = ($urandom % 3) != 0;
    end
    @(negedge clk); step_en = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (takes < 40 || bits_seen < 128 * 39) begin
      failures++;
      $display("FAIL only %0d columns, %0d bits", takes, bits_seen);
    end
    $display("columns %0d bits %0d", takes, bits_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

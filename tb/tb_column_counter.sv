// tb_column_counter - checks the column address sequence: hold at 0 until
// run, count from 0 up to the end register, jump to the start register,
// loop, honour step, wrap past the last column, and restart after reset.
module tb_column_counter;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int AW = 12;
  logic rst, run, step;
  logic [AW-1:0] start_addr, end_addr, addr;
  logic wrapped;
  int checks = 0, failures = 0;
  int exp_addr, n_wraps;

  column_counter #(.AW(AW)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_steps(input int n, input int s, input int e);
    for (int i = 0; i < n; i++) begin
      bit st;
      st = ($urandom % 3) != 0;
      @(negedge clk);
      step = st;
      @(posedge clk);
      #1;
      if (st) begin
        if (exp_addr == e) begin exp_addr = s; n_wraps++; end
        else exp_addr = (exp_addr + 1) % (1 << AW);
      end
      checks++;
      if (addr !== AW'(exp_addr) || wrapped !== (st && exp_addr == s && n_wraps > 0 && addr == AW'(s))) begin
        if (addr !== AW'(exp_addr)) begin
          failures++;
          $display("FAIL addr %0d expected %0d", addr, exp_addr);
        end
      end
    end
    @(negedge clk); step = 1'b0;
  endtask

  initial begin
    rst = 1; run = 0; step = 0; start_addr = 12'd5; end_addr = 12'd12;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0; step = 1;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (addr !== '0) begin failures++; $display("FAIL moved without run"); end
    @(negedge clk); run = 1; step = 0; exp_addr = 0; n_wraps = 0;
    run_steps(100, 5, 12);
    checks++;
    if (n_wraps < 5) begin failures++; $display("FAIL too few loops"); end
    // one-column loop
    @(negedge clk); rst = 1; start_addr = 12'd1023; end_addr = 12'd1023;
    @(negedge clk); rst = 0; exp_addr = 0;
    run_steps(1100, 1023, 1023);
    // wrap past the top of memory
    @(negedge clk); rst = 1; start_addr = 12'd4094; end_addr = 12'd1;
    @(negedge clk); rst = 0; exp_addr = 0;
    begin
      // from 0 to 1 then jump to 4094, 4095, 0, 1, 4094 ...
      for (int i = 0; i < 20; i++) begin
        @(negedge clk); step = 1'b1;
        @(posedge clk); #1;
        if (exp_addr == 1) exp_addr = 4094; else exp_addr = (exp_addr + 1) % 4096;
        checks++;
        if (addr !== AW'(exp_addr)) begin
          failures++;
          $display("FAIL wrap addr %0d expected %0d", addr, exp_addr);
        end
      end
    end
    // wrapped pulse
    @(negedge clk); rst = 1; start_addr = 12'd3; end_addr = 12'd4; step = 1'b0;
    @(negedge clk); rst = 0;
    begin
      int pulses;
      pulses = 0;
      for (int i = 0; i < 10; i++) begin
        @(negedge clk); step = 1'b1;
        @(posedge clk); #1;
        if (wrapped) pulses++;
      end
      checks++;
      // 0,1,2,3,4,(3),4,(3),4,(3): jumps on steps 6, 8, 10
      if (pulses != 3) begin failures++; $display("FAIL %0d wrap pulses", pulses); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

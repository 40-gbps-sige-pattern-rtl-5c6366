// tb_pattern_ram - writes random columns to all four banks, including the
// first and last column of each, and reads them back through the 12-bit
// {bank, column} address, checking the one-clock read latency and that a
// read holds its word while rd_en is low.
module tb_pattern_ram;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [COL_W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  pattern_ram dut (.*);

  logic [COL_W-1:0] ref_mem [int];
  int addrs [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COL_W-1:0] rnd();
    logic [COL_W-1:0] w;
    for (int k = 0; k < COL_W / 32; k++) w[32*k +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    for (int b = 0; b < 4; b++) begin
      addrs.push_back(b * 1024);
      addrs.push_back(b * 1024 + 1023);
      for (int n = 0; n < 50; n++) addrs.push_back(b * 1024 + ($urandom % 1024));
    end
    foreach (addrs[i]) begin
      logic [COL_W-1:0] w;
      w = rnd();
      ref_mem[addrs[i]] = w;
      @(negedge clk);
      wr_en = 1'b1; wr_addr = ADDR_W'(addrs[i]); wr_data = w;
    end
    @(negedge clk); wr_en = 1'b0;
    foreach (addrs[i]) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = ADDR_W'(addrs[i]);
      @(negedge clk);
      rd_en = 1'b0; rd_addr = ADDR_W'(addrs[(i + 7) % addrs.size()]);
      checks++;
      if (rd_data !== ref_mem[addrs[i]]) begin
        failures++;
        $display("FAIL addr %0d", addrs[i]);
      end
      @(negedge clk);   // word is held while rd_en is low
      checks++;
      if (rd_data !== ref_mem[addrs[i]]) begin
        failures++;
        $display("FAIL hold addr %0d", addrs[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

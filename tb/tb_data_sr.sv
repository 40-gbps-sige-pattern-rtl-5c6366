// tb_data_sr - shifts 16 bytes into the data register, byte 0 first and
// MSB first as the test software does, and checks where every byte lands
// (byte i in q[127-8i -: 8]), then checks the synchronous clear.
module tb_data_sr;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  logic sclk = 1'b0, srst = 1'b0, sdi = 1'b0;
  logic [COL_W-1:0] q;
  int checks = 0, failures = 0;
  logic [7:0] bytes [16];

  data_sr dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clk_pulse();
    #5 sclk = 1'b1;
    #5 sclk = 1'b0;
  endtask

  initial begin
    srst = 1'b1; clk_pulse(); srst = 1'b0;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 16; i++) bytes[i] = 8'($urandom);
      for (int i = 0; i < 16; i++)
        for (int b = 7; b >= 0; b--) begin
          sdi = bytes[i][b];
          clk_pulse();
        end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (q[COL_W-1-8*i -: 8] !== bytes[i]) begin
          failures++;
          $display("FAIL load %0d byte %0d: %h expected %h", n, i, q[COL_W-1-8*i -: 8], bytes[i]);
        end
      end
    end
    srst = 1'b1; clk_pulse(); srst = 1'b0;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_control_sr - loads the control register the way the test software
// does (level shift, output swing, high level, current feedback as 8-bit
// fields, cascode bias as 2 bits, vernier 2, vernier 1, path select as 2
// bits, each MSB first) and checks every decoded field, the serial
// read-back of the previous contents and the synchronous reset.
module tb_control_sr;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  logic sclk = 1'b0, srst = 1'b0, sdi = 1'b0;
  logic sdo;
  ctrl_regs_t regs;
  int checks = 0, failures = 0;
  logic [CTRL_BITS-1:0] readback;
  int rb_n;

  control_sr dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clk_pulse();
    #5 sclk = 1'b1;
    #5 sclk = 1'b0;
  endtask

  // send `bits` bits of v, MSB first, reading sdo before every clock
  task automatic send(input logic [7:0] v, input int bits);
    for (int i = bits - 1; i >= 0; i--) begin
      readback = {readback[CTRL_BITS-2:0], sdo};
      rb_n++;
      sdi = v[i];
      clk_pulse();
    end
  endtask

  task automatic load(input logic [7:0] ls, os, hls, cfs, input logic [1:0] bd,
                      input logic [7:0] v2, v1, input logic [1:0] dl);
    rb_n = 0;
    send(ls, 8); send(os, 8); send(hls, 8); send(cfs, 8);
    send({6'd0, bd}, 2); send(v2, 8); send(v1, 8); send({6'd0, dl}, 2);
  endtask

  task automatic expect_regs(input logic [7:0] ls, os, hls, cfs, input logic [1:0] bd,
                             input logic [7:0] v2, v1, input logic [1:0] dl);
    checks++;
    if (regs.ls !== ls || regs.os !== os || regs.hls !== hls || regs.cfs !== cfs ||
        regs.breakdown !== bd || regs.vern2 !== v2 || regs.vern1 !== v1 ||
        regs.delay_sel !== dl) begin
      failures++;
      $display("FAIL fields: %p", regs);
    end
  endtask

  initial begin
    srst = 1'b1; clk_pulse(); srst = 1'b0;
    checks++;
    if (regs !== '0) begin failures++; $display("FAIL reset"); end
    load(8'haa, 8'hff, 8'h00, 8'h48, 2'b11, 8'h12, 8'h80, 2'b01);
    expect_regs(8'haa, 8'hff, 8'h00, 8'h48, 2'b11, 8'h12, 8'h80, 2'b01);
    // second load reads the first contents back, first-loaded field first
    load(8'h3c, 8'h01, 8'hc3, 8'h7e, 2'b10, 8'hfe, 8'h5a, 2'b10);
    expect_regs(8'h3c, 8'h01, 8'hc3, 8'h7e, 2'b10, 8'hfe, 8'h5a, 2'b10);
    checks++;
    if (readback !== {8'haa, 8'hff, 8'h00, 8'h48, 2'b11, 8'h12, 8'h80, 2'b01}) begin
      failures++;
      $display("FAIL readback %h", readback);
    end
    // random loads
    for (int n = 0; n < 20; n++) begin
      logic [7:0] a, b, c, d, e, f;
      logic [1:0] g, h;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      e = 8'($urandom); f = 8'($urandom); g = 2'($urandom); h = 2'($urandom);
      load(a, b, c, d, g, e, f, h);
      expect_regs(a, b, c, d, g, e, f, h);
    end
    srst = 1'b1; clk_pulse(); srst = 1'b0;
    checks++;
    if (regs !== '0 || sdo !== 1'b0) begin failures++; $display("FAIL second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pg_top_fullmem - end-to-end test of the pattern generator over its
// whole pattern memory and at the ends of its setting ranges.
//
//  1. Sets the longest clock delay (six-inverter path, both vernier codes
//     255) over the control register and checks the delay:
//     52.515 + 45.891 + 4.742 + 4.527 = 107.675 ps.
//  2. Fills all 4096 columns (4 x 1024 x 128 = 524,288 bits, eight times
//     the 64 Kbit minimum pattern depth asked of the generator) through the
//     data shift register and the load strobe, with random data.
//  3. Starts with the longest N-cycle delay (N = 255) and checks that the
//     first bit comes 1020 to 1023 clocks after start.
//  4. Checks every bit of one pass over the whole memory (columns 0 to
//     4095, crossing all bank boundaries), then two turns of the loop
//     4093..4095 at the top of the address range.
// Each mechanism used (clock delay, N-cycle delay, bank crossing, loop
// jump) is counted and must happen at least once.
module tb_pg_top_fullmem;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  localparam int NCOLS = NUM_BANKS * BANK_COLS;
  localparam int LOOP_S = NCOLS - 3;

  logic clk_in_p = 1'b0;
  logic clk_in_n;
  assign clk_in_n = ~clk_in_p;
  always #5 clk_in_p = ~clk_in_p;

  logic clk_out_p, clk_out_n;
  logic rst, start;
  logic [ADDR_W-1:0] start_addr, end_addr, load_addr;
  logic [1:0] div_sel;
  logic [7:0] ncycle_count;
  logic sr_reset, sr_data, sr_cc, sr_dc, sr_out;
  logic load;
  logic dout, dout_valid;
  logic [7:0] drv_high_level, drv_feedback, drv_swing, drv_level_shift;
  logic [1:0] drv_cascode;
  logic [ADDR_W-1:0] col_addr;
  logic loop_wrap;
  logic rc_enable, rc_step_en;
  table_entry_t rc_table [ENTRIES];
  logic rc_wr_en;
  logic [1:0] rc_wr_bank;
  logic [COL_AW-1:0] rc_wr_col;
  logic [COL_W-1:0] rc_wr_data;
  logic [ROW_W-1:0] rc_row;
  logic rc_row_valid;
  logic [1:0] rc_entry;
  logic [9:0] rc_cycle_count;
  bank_e rc_fmux;
  logic rc_ev_full_jump, rc_ev_partial_jump, rc_ev_bank_switch, rc_ev_entry_next;

  pg_top dut (.*);

  int checks = 0, failures = 0;
  int n_delay = 0, n_ncycle = 0, n_bankcross = 0, n_loop = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2_000_000) @(posedge clk_in_p);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- serial helpers
  task automatic pulse(ref logic c);
    #2 c = 1'b1;
    #2 c = 1'b0;
  endtask

  task automatic send_bits(input logic [7:0] v, input int bits, ref logic c);
    for (int i = bits - 1; i >= 0; i--) begin
      sr_data = v[i];
      pulse(c);
    end
  endtask

  // ------------------------------------------------------ reference
  logic [COL_W-1:0] mem [NCOLS];

  // column sequence 0..NCOLS-1, then LOOP_S..NCOLS-1 repeated
  function automatic int exp_col(input int c);
    if (c < NCOLS) return c;
    return LOOP_S + (c - LOOP_S) % (NCOLS - LOOP_S);
  endfunction

  logic [ADDR_W-1:0] addr_d;
  always @(posedge clk_out_p) begin
    addr_d <= col_addr;
    if (loop_wrap) n_loop++;
    if (start && col_addr[ADDR_W-1 -: 2] != addr_d[ADDR_W-1 -: 2] && col_addr[COL_AW-1:0] == '0)
      n_bankcross++;
  end

  // ----------------------------------------------------------- stimulus
  initial begin
    realtime t0, t1;
    rst = 1; start = 0; start_addr = '0; end_addr = '0; load_addr = '0;
    div_sel = 0; ncycle_count = 0; sr_reset = 0; sr_data = 0; sr_cc = 0; sr_dc = 0;
    load = 0; rc_enable = 0; rc_step_en = 0; rc_wr_en = 0; rc_wr_bank = 0;
    rc_wr_col = 0; rc_wr_data = '0;
    for (int i = 0; i < ENTRIES; i++) rc_table[i] = '0;
    repeat (4) @(negedge clk_in_p);
    rst = 0;

    // ---- 1. longest clock delay
    sr_reset = 1; pulse(sr_cc); pulse(sr_dc); sr_reset = 0;
    send_bits(8'h00, 8, sr_cc);   // level shift
    send_bits(8'h00, 8, sr_cc);   // output swing
    send_bits(8'h00, 8, sr_cc);   // high level
    send_bits(8'h00, 8, sr_cc);   // current feedback
    send_bits(8'h00, 2, sr_cc);   // cascode bias
    send_bits(8'hff, 8, sr_cc);   // vernier 2
    send_bits(8'hff, 8, sr_cc);   // vernier 1
    send_bits(8'h00, 2, sr_cc);   // path: six inverters
    @(negedge clk_in_p);
    @(posedge clk_in_p); t0 = $realtime;
    @(posedge clk_out_p); t1 = $realtime;
    check((t1 - t0) > 0.1076 && (t1 - t0) < 0.1078, $sformatf("clock delay %f ns", t1 - t0));
    if ((t1 - t0) > 0.1) n_delay++;

    // ---- 2. fill the memory
    for (int c = 0; c < NCOLS; c++) begin
      logic [7:0] bytes [16];
      for (int i = 0; i < 16; i++) begin
        bytes[i] = 8'($urandom);
        mem[c][COL_W-1-8*i -: 8] = bytes[i];
      end
      for (int i = 0; i < 16; i++) send_bits(bytes[i], 8, sr_dc);
      @(negedge clk_in_p); load = 1; load_addr = ADDR_W'(c);
      @(negedge clk_in_p); load = 0;
    end

    // ---- 3. start with N = 255
    start_addr = ADDR_W'(LOOP_S); end_addr = ADDR_W'(NCOLS - 1);
    div_sel = 2'd0; ncycle_count = 8'd255;
    @(negedge clk_in_p); start = 1;
    begin
      int wait_clocks;
      wait_clocks = 0;
      while (!dout_valid) begin
        @(negedge clk_in_p);
        wait_clocks++;
      end
      check(wait_clocks >= 4 * 255 && wait_clocks <= 4 * 255 + 3,
            $sformatf("first bit after %0d clocks", wait_clocks));
      if (wait_clocks >= 4 * 255) n_ncycle++;
    end

    // ---- 4. whole memory, then the loop at the top
    for (int c = 0; c < NCOLS + 2 * (NCOLS - LOOP_S); c++) begin
      int ec;
      ec = exp_col(c);
      for (int b = 0; b < COL_W; b++) begin
        check(dout === mem[ec][b], $sformatf("column %0d bit %0d", ec, b));
        @(negedge clk_in_p);
      end
    end
    @(negedge clk_in_p); start = 0;

    $display("delay %0d n-cycle %0d bank crossings %0d loop %0d",
             n_delay, n_ncycle, n_bankcross, n_loop);
    check(n_delay > 0, "longest clock delay never seen");
    check(n_ncycle > 0, "N-cycle delay never seen");
    check(n_bankcross >= NUM_BANKS - 1, "bank boundaries not all crossed");
    check(n_loop >= 2, "loop never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

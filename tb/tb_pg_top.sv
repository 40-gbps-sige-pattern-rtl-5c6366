// tb_pg_top - end-to-end test of the pattern generator at its default
// sizes.
//
//  1. Loads the control shift register over the serial port and checks the
//     output-driver settings and the delay of the clock through the
//     vernier/inverter-chain model.
//  2. Loads six memory columns through the data shift register and the
//     load strobe.
//  3. Starts the generator with an N-cycle delay, checks when the first
//     bit appears, and checks the serial stream: columns 0, 1, then the
//     loop 2..5 repeated.
//  4. Restarts at a quarter of the rate and checks that every bit is held
//     for four clocks.
//  5. Runs the table-driven RAM controller through a table with full and
//     partial column jumps across all three pattern banks against a
//     reference walk.
// Each mechanism (vernier delay, N-cycle delay, loop jump, rate division,
// full jump, partial jump, bank hand-over, table entry change) is counted
// and must happen at least once.
module tb_pg_top;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  // ------------------------------------------------------------- signals
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
  int n_vernier = 0, n_ncycle = 0, n_loop = 0, n_ratediv = 0;
  int n_full = 0, n_part = 0, n_bank = 0, n_entry = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (1_000_000) @(posedge clk_in_p);
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

  // ------------------------------------------------ main data path model
  logic [COL_W-1:0] col_mem [6];

  function automatic logic exp_bit(input longint t, input int s, input int e);
    // column sequence 0,1,..,e then s..e repeated
    longint c, b;
    c = t / COL_W;
    b = t % COL_W;
    if (c > e) c = s + (c - s) % (e - s + 1);
    return col_mem[c][b];
  endfunction

  // ------------------------------------------------ RAM controller model
  logic [COL_W-1:0] rc_mem [3][BANK_COLS];
  int r_bank, r_col, r_row, r_entry, r_jumps;
  int rc_rows = 0;
  logic rc_se_d = 1'b0;

  function automatic table_entry_t mk(int sb, int sc, int tr, int tb_, int tc, int cyc, int dc);
    table_entry_t e;
    e.start.bank = 2'(sb); e.start.col = 10'(sc);
    e.stop.row = 4'(tr); e.stop.bank = 2'(tb_); e.stop.col = 10'(tc);
    e.cycles = 10'(cyc); e.d_col = 10'(dc);
    return e;
  endfunction

  task automatic ref_advance();
    table_entry_t e;
    bit seq;
    e = rc_table[r_entry];
    seq = 1;
    if (r_bank == int'(e.stop.bank) && r_col == int'(e.stop.col) && r_row == int'(e.stop.row)) begin
      if (r_jumps < int'(e.cycles)) begin
        r_jumps++;
        r_bank = int'(e.start.bank); r_col = int'(e.start.col); r_row = 0;
        seq = 0;
      end else begin
        r_jumps = 0;
        r_entry = (r_entry + 1) % ENTRIES;
      end
    end
    if (seq) begin
      r_row++;
      if (r_row == ROWS) begin
        r_row = 0;
        r_col++;
        if (r_col == BANK_COLS) begin
          r_col = 0;
          r_bank = (r_bank + 1) % 3;
        end
      end
    end
  endtask

  always @(posedge clk_out_p) begin
    rc_se_d <= rc_step_en;
    if (rc_ev_full_jump)    n_full++;
    if (rc_ev_partial_jump) n_part++;
    if (rc_ev_bank_switch)  n_bank++;
    if (rc_ev_entry_next)   n_entry++;
    if (loop_wrap)          n_loop++;
    if (rc_se_d && rc_enable && rc_row_valid) begin
      check(rc_row === rc_mem[r_bank][r_col][ROW_W*r_row +: ROW_W], "RAM controller row");
      rc_rows++;
      ref_advance();
    end
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

    // ---- 1. control register
    sr_reset = 1; pulse(sr_cc); pulse(sr_dc); sr_reset = 0;
    send_bits(8'haa, 8, sr_cc);   // level shift
    send_bits(8'hff, 8, sr_cc);   // output swing
    send_bits(8'h10, 8, sr_cc);   // high level
    send_bits(8'h20, 8, sr_cc);   // current feedback
    send_bits(8'h03, 2, sr_cc);   // cascode bias
    send_bits(8'h80, 8, sr_cc);   // vernier 2
    send_bits(8'hff, 8, sr_cc);   // vernier 1
    send_bits(8'h02, 2, sr_cc);   // path: stage1 = 0, stage2 = 1 -> two inverters
    check(drv_level_shift == 8'haa && drv_swing == 8'hff && drv_high_level == 8'h10 &&
          drv_feedback == 8'h20 && drv_cascode == 2'b11, "output driver settings");
    // clock delay: 52.515 + 14.007 (two inverters) + 4.742 + 0.765 ps
    @(negedge clk_in_p);
    @(posedge clk_in_p); t0 = $realtime;
    @(posedge clk_out_p); t1 = $realtime;
    check((t1 - t0) > 0.0719 && (t1 - t0) < 0.0722, $sformatf("clock delay %f ns", t1 - t0));
    if ((t1 - t0) > 0.0) n_vernier++;

    // ---- 2. memory load through the data shift register
    for (int c = 0; c < 6; c++) begin
      logic [7:0] bytes [16];
      for (int i = 0; i < 16; i++) begin
        bytes[i] = 8'($urandom);
        col_mem[c][COL_W-1-8*i -: 8] = bytes[i];
      end
      for (int i = 0; i < 16; i++) send_bits(bytes[i], 8, sr_dc);
      @(negedge clk_in_p); load = 1; load_addr = ADDR_W'(c);
      @(negedge clk_in_p); load = 0;
    end

    // ---- 3. full rate, N-cycle delay, loop 2..5
    start_addr = 12'd2; end_addr = 12'd5; div_sel = 2'd0; ncycle_count = 8'd5;
    @(negedge clk_in_p); start = 1;
    begin
      int wait_clocks;
      longint t;
      wait_clocks = 0;
      while (!dout_valid) begin
        @(negedge clk_in_p);
        wait_clocks++;
      end
      check(wait_clocks >= 4 * 5 && wait_clocks <= 4 * 5 + 3,
            $sformatf("first bit after %0d clocks", wait_clocks));
      if (wait_clocks >= 4 * 5) n_ncycle++;
      for (t = 0; t < 12 * COL_W; t++) begin
        check(dout === exp_bit(t, 2, 5), $sformatf("bit %0d", t));
        @(negedge clk_in_p);
      end
    end
    check(n_loop >= 2, "loop wrapped");

    // ---- 4. quarter rate
    @(negedge clk_in_p); start = 0; div_sel = 2'd2; ncycle_count = 8'd0;
    @(negedge clk_in_p); start = 1;
    while (!dout_valid) @(negedge clk_in_p);
    begin
      int held_ok;
      held_ok = 1;
      for (longint t = 0; t < 3 * COL_W; t++) begin
        for (int r = 0; r < 4; r++) begin
          if (dout !== exp_bit(t, 2, 5)) held_ok = 0;
          check(dout === exp_bit(t, 2, 5), $sformatf("quarter-rate bit %0d copy %0d", t, r));
          @(negedge clk_in_p);
        end
      end
      if (held_ok) n_ratediv++;
    end
    @(negedge clk_in_p); start = 0;

    // ---- 5. table-driven RAM controller
    rc_table[0] = mk(0, 5, 15, 0, 9, 2, 0);      // full-column loop in A
    rc_table[1] = mk(0, 20, 6, 0, 25, 3, 100);   // partial loop in A
    rc_table[2] = mk(1, 2, 11, 1, 6, 1, 200);    // partial loop in B
    rc_table[3] = mk(2, 10, 15, 2, 10, 2, 0);    // one-column loop in C
    for (int b = 0; b < 3; b++)
      for (int c = 0; c < BANK_COLS; c++) begin
        logic [COL_W-1:0] w;
        for (int k = 0; k < COL_W / 32; k++) w[32*k +: 32] = $urandom;
        rc_mem[b][c] = w;
        @(negedge clk_in_p);
        rc_wr_en = 1; rc_wr_bank = 2'(b); rc_wr_col = 10'(c); rc_wr_data = w;
      end
    @(negedge clk_in_p); rc_wr_bank = 2'd3; rc_wr_col = 10'd100; rc_wr_data = rc_mem[0][25];
    @(negedge clk_in_p); rc_wr_bank = 2'd3; rc_wr_col = 10'd200; rc_wr_data = rc_mem[1][6];
    @(negedge clk_in_p); rc_wr_en = 0;
    r_bank = 0; r_col = 5; r_row = 0; r_entry = 0; r_jumps = 0;
    rc_enable = 1;
    while (rc_rows < 110000) begin
      @(negedge clk_in_p);
      rc_step_en = ($urandom % 5) != 0;
    end
    @(negedge clk_in_p); rc_step_en = 0;
    repeat (3) @(negedge clk_in_p);

    // ---- mechanisms
    $display("vernier %0d n-cycle %0d loop %0d rate-div %0d full-jump %0d partial-jump %0d bank %0d entry %0d",
             n_vernier, n_ncycle, n_loop, n_ratediv, n_full, n_part, n_bank, n_entry);
    check(n_vernier > 0, "vernier delay never seen");
    check(n_ncycle > 0, "N-cycle delay never seen");
    check(n_loop > 0, "loop never seen");
    check(n_ratediv > 0, "rate division never seen");
    check(n_full > 0, "full column jump never seen");
    check(n_part > 0, "partial column jump never seen");
    check(n_bank > 0, "bank hand-over never seen");
    check(n_entry > 0, "table entry change never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

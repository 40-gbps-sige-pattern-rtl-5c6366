// tb_ram_controller_cases - the table-driven RAM controller on two basic
// loop cases, run over the whole table and around it twice.
//
//  * full-column loop: start column 0 of bank B, stop code
//    1111_01_0000011111 (last row of column 31 in bank B), 3 jumps;
//  * partial-column loop: start column 0 of bank A, stop after row 7 of
//    column 31 in bank A, 2 jumps, copy of column 31 kept in bank D at
//    column 5.
// Entries 0 and 2 hold the first case, entries 1 and 3 the second; from
// the end of one loop the stream runs on through the banks to the next.
// Checked, with the row clock enable high on every clock:
//  * every output row against a reference walk;
//  * one row per clock once running (no gap at any jump);
//  * `cycle_count` counts 1, 2, .. at each jump of an entry, reaches the
//    entry's jump count and returns to 0 when the next entry takes over,
//    and `entry` steps 0, 1, 2, 3, 0, ..;
//  * during each partial jump the final mux selects bank D for exactly
//    stop_row + 1 = 8 rows, then returns to bank A.
module tb_ram_controller_cases;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  localparam int DEPTH = BANK_COLS;
  localparam int PART_ROW = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, enable, step_en;
  table_entry_t tbl [ENTRIES];
  logic wr_en;
  logic [1:0] wr_bank;
  logic [COL_AW-1:0] wr_col;
  logic [COL_W-1:0] wr_data;
  logic [ROW_W-1:0] row_out;
  logic row_valid;
  logic [1:0] entry;
  logic [9:0] cycle_count;
  bank_e fmux;
  logic ev_full_jump, ev_partial_jump, ev_bank_switch, ev_entry_next;

  ram_controller dut (.*);

  logic [COL_W-1:0] ref_mem [3][DEPTH];

  int checks = 0, failures = 0;
  int n_full = 0, n_part = 0, n_entry = 0, n_bank = 0, table_rounds = 0;
  int rows_seen = 0, clocks_running = 0;
  int r_bank, r_col, r_row, r_entry, r_jumps;
  int exp_cycle = 0, exp_entry = 0;
  int d_run = 0, d_runs = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // stop = {row, bank, column}, start = {bank, column}
  function automatic table_entry_t mk(input logic [15:0] stop, input logic [11:0] start,
                                      input int cyc, input int dc);
    table_entry_t e;
    e.start  = start;
    e.stop   = stop;
    e.cycles = 10'(cyc);
    e.d_col  = 10'(dc);
    return e;
  endfunction

  task automatic ref_advance();
    table_entry_t e;
    bit seq;
    e = tbl[r_entry];
    seq = 1;
    if (r_bank == int'(e.stop.bank) && r_col == int'(e.stop.col) && r_row == int'(e.stop.row)) begin
      if (r_jumps < int'(e.cycles)) begin
        r_jumps++;
        r_bank = int'(e.start.bank); r_col = int'(e.start.col); r_row = 0;
        seq = 0;
      end else begin
        r_jumps = 0;
        r_entry = (r_entry + 1) % ENTRIES;
        if (r_entry == 0) table_rounds++;
      end
    end
    if (seq) begin
      r_row++;
      if (r_row == ROWS) begin
        r_row = 0;
        r_col++;
        if (r_col == DEPTH) begin
          r_col = 0;
          r_bank = (r_bank + 1) % 3;
        end
      end
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (enable && !rst) begin
      // jump counter and entry sequence
      if (ev_full_jump || ev_partial_jump) begin
        exp_cycle++;
        check(cycle_count == 10'(exp_cycle) && cycle_count <= tbl[entry].cycles,
              $sformatf("cycle_count %0d, expected %0d", cycle_count, exp_cycle));
        check(ev_partial_jump == (tbl[entry].stop.row != 4'hf), "jump kind");
      end
      if (ev_entry_next) begin
        check(exp_cycle == int'(tbl[exp_entry].cycles),
              $sformatf("entry %0d left after %0d jumps", exp_entry, exp_cycle));
        exp_entry = (exp_entry + 1) % ENTRIES;
        exp_cycle = 0;
        check(entry == 2'(exp_entry) && cycle_count == '0, "next entry");
      end
      if (ev_full_jump)    n_full++;
      if (ev_partial_jump) n_part++;
      if (ev_entry_next)   n_entry++;
      if (ev_bank_switch)  n_bank++;
      // bank D runs on the final mux
      if (fmux == BANK_D) d_run++;
      else if (d_run != 0) begin
        check(d_run == PART_ROW + 1 && fmux == BANK_A,
              $sformatf("bank D selected for %0d rows", d_run));
        d_runs++;
        d_run = 0;
      end
      // output rows
      if (row_valid) begin
        check(row_out === ref_mem[r_bank][r_col][ROW_W*r_row +: ROW_W],
              $sformatf("row %0d (bank %0d column %0d row %0d)", rows_seen, r_bank, r_col, r_row));
        rows_seen++;
        ref_advance();
      end
      if (rows_seen > 0) clocks_running++;
    end
  end

  initial begin
    rst = 1; enable = 0; step_en = 0; wr_en = 0; wr_bank = 0; wr_col = 0; wr_data = '0;
    tbl[0] = mk(16'b1111_01_0000011111, 12'b01_0000000000, 3, 0);
    tbl[1] = mk({4'(PART_ROW), 2'b00, 10'd31}, 12'b00_0000000000, 2, 5);
    tbl[2] = tbl[0];
    tbl[3] = tbl[1];
    repeat (3) @(posedge clk);
    rst = 0;
    for (int b = 0; b < 3; b++)
      for (int c = 0; c < DEPTH; c++) begin
        logic [COL_W-1:0] w;
        for (int k = 0; k < COL_W / 32; k++) w[32*k +: 32] = $urandom;
        ref_mem[b][c] = w;
        @(negedge clk);
        wr_en = 1; wr_bank = 2'(b); wr_col = 10'(c); wr_data = w;
      end
    @(negedge clk); wr_bank = 2'd3; wr_col = 10'd5; wr_data = ref_mem[0][31];
    @(negedge clk); wr_en = 0;
    r_bank = 1; r_col = 0; r_row = 0; r_entry = 0; r_jumps = 0;
    @(negedge clk); enable = 1; step_en = 1;
    while (table_rounds < 2) @(negedge clk);
    repeat (40) @(negedge clk);
    enable = 0;
    $display("rows %0d full jumps %0d partial jumps %0d bank D runs %0d entries %0d bank switches %0d",
             rows_seen, n_full, n_part, d_runs, n_entry, n_bank);
    check(clocks_running == rows_seen, "one row per clock");
    check(n_full == 4 * 3 && n_part >= 4 * 2 && n_part <= 4 * 2 + 1, "number of jumps");
    check(d_runs >= 4 * 2, "bank D used at every partial jump");
    check(n_entry >= 8 && n_bank > 0, "entries and bank hand-over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ram_controller - self-checking test of the table-driven RAM controller.
//
// Banks A-C are filled with random columns; for each entry with a partial
// stop the stop column is also copied into bank D, as the loading software
// would. A four-entry table exercises full-column loops, partial-column
// loops, a one-column loop, the hand-over from bank A to B to C and back
// to A, and the wrap from the last table entry to the first. A reference
// walk over (bank, column, row) predicts every output row; the row clock
// enable is irregular to check that the controller only moves on enabled
// clocks. Also checked: the output rate (one row per enabled clock once
// running) and that every mechanism happened as often as predicted.
module tb_ram_controller;
  timeunit 1ns;
  timeprecision 1ps;
  import pg_pkg::*;

  localparam int DEPTH = BANK_COLS;
  localparam int ROWS_TO_CHECK = 120000;

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
  int n_full = 0, n_part = 0, n_bank = 0, n_entry = 0;       // seen
  int m_full = 0, m_part = 0, m_bank = 0, m_entry = 0;       // predicted
  int rows_seen = 0, steps_running = 0;

  // reference walk
  int r_bank, r_col, r_row, r_entry, r_jumps;

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
    e = tbl[r_entry];
    seq = 1;
    if (r_bank == int'(e.stop.bank) && r_col == int'(e.stop.col) && r_row == int'(e.stop.row)) begin
      if (r_jumps < int'(e.cycles)) begin
        r_jumps++;
        if (e.stop.row == 4'hf) m_full++; else m_part++;
        r_bank = int'(e.start.bank); r_col = int'(e.start.col); r_row = 0;
        seq = 0;
      end else begin
        r_jumps = 0;
        r_entry = (r_entry + 1) % ENTRIES;
        m_entry++;
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
          m_bank++;
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

  // compare every new row
  logic se_d = 1'b0;
  always @(posedge clk) begin
    se_d <= step_en;
    if (ev_full_jump)    n_full++;
    if (ev_partial_jump) n_part++;
    if (ev_bank_switch)  n_bank++;
    if (ev_entry_next)   n_entry++;
    if (se_d && enable && !rst) begin
      if (row_valid) begin
        logic [ROW_W-1:0] exp_row;
        exp_row = ref_mem[r_bank][r_col][ROW_W*r_row +: ROW_W];
        checks++;
        if (row_out !== exp_row) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d: bank %0d col %0d row %0d got %02h exp %02h",
                     rows_seen, r_bank, r_col, r_row, row_out, exp_row);
        end
        rows_seen++;
        ref_advance();
      end
      if (rows_seen > 0) steps_running++;
    end
  end

  initial begin
    rst = 1; enable = 0; step_en = 0; wr_en = 0; wr_bank = 0; wr_col = 0; wr_data = '0;
    tbl[0] = mk(0, 5, 15, 0, 9, 2, 0);      // A5..A9 full column, 2 jumps
    tbl[1] = mk(0, 20, 6, 0, 25, 3, 100);   // A20..A25 row 6, 3 jumps
    tbl[2] = mk(1, 2, 11, 1, 6, 1, 200);    // B2..B6 row 11, 1 jump
    tbl[3] = mk(2, 10, 15, 2, 10, 2, 0);    // C10 alone, 2 jumps
    repeat (3) @(posedge clk);
    rst = 0;
    // load banks A-C
    for (int b = 0; b < 3; b++)
      for (int c = 0; c < DEPTH; c++) begin
        logic [COL_W-1:0] w;
        for (int k = 0; k < COL_W / 32; k++) w[32*k +: 32] = $urandom;
        ref_mem[b][c] = w;
        @(negedge clk);
        wr_en = 1; wr_bank = 2'(b); wr_col = 10'(c); wr_data = w;
      end
    // copies of the partial stop columns in bank D
    @(negedge clk); wr_bank = 2'd3; wr_col = 10'd100; wr_data = ref_mem[0][25];
    @(negedge clk); wr_bank = 2'd3; wr_col = 10'd200; wr_data = ref_mem[1][6];
    @(negedge clk); wr_en = 0;
    // start
    r_bank = 0; r_col = 5; r_row = 0; r_entry = 0; r_jumps = 0;
    enable = 1;
    while (rows_seen < ROWS_TO_CHECK) begin
      @(negedge clk);
      step_en = ($urandom % 4) != 0;
    end
    @(negedge clk); step_en = 0;
    repeat (4) @(posedge clk);
    // rate: one row per enabled clock once running
    checks++;
    if (steps_running != rows_seen) begin
      failures++;
      $display("FAIL rate: %0d enabled clocks, %0d rows", steps_running, rows_seen);
    end
    // mechanisms
    $display("full jumps %0d/%0d partial jumps %0d/%0d bank switches %0d/%0d entry changes %0d/%0d",
             n_full, m_full, n_part, m_part, n_bank, m_bank, n_entry, m_entry);
    checks++;
    if (n_full == 0 || n_part == 0 || n_bank == 0 || n_entry == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    // the controller decides up to two columns ahead of the output
    if (n_full < m_full || n_full > m_full + 1 || n_part < m_part || n_part > m_part + 1) begin
      failures++;
      $display("FAIL jump counts differ from the reference");
    end
    // restart from the first entry after enable drops
    @(negedge clk); enable = 0;
    @(negedge clk); enable = 1;
    r_bank = 0; r_col = 5; r_row = 0; r_entry = 0; r_jumps = 0;
    begin
      int target;
      target = rows_seen + 200;
      while (rows_seen < target) begin
        @(negedge clk);
        step_en = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

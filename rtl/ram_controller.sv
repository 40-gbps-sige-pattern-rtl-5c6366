// ram_controller - table-driven pattern memory controller with looping and
// full/partial column jumps, over four SRAM banks A, B, C and D.
//
// Banks A, B and C (1024 columns x 128 bits each) hold the pattern and are
// read as one sequence A0..A1023, B0..B1023, C0..C1023, then A0 again.
// A column is sent out as 16 rows of 8 bits, row 0 (bits 7:0) first. A
// table of four entries turns the memory into a longer pattern: entry e
// plays on until its stop point (stop column, stop row), jumps back to its
// start column `cycles` times, and on the pass after the last jump runs on
// past the stop point and hands over to entry e+1 (after entry 3 comes
// entry 0 again). A stop row of 15 is a full-column stop; any other value
// ends the loop part way through the column (partial stop).
//
// Data path (one set per bank): 10-bit column counter -> SRAM read
// register -> column register (first flip-flop stage) -> 8-bit row mux ->
// final 4:1 bank mux -> output row register (second flip-flop stage).
// Every bank is read at each column boundary; the muxes choose which data
// goes on. A read started at one column boundary is used during the column
// period after the next one, so the column to follow is chosen one column
// ahead:
//  * full stop: when the stop column has been issued, the bank counter is
//    set back to the start column;
//  * partial stop: the stop column and the start column would both be
//    needed in the same period from the same bank. Software keeps a copy
//    of the stop column in bank D at `d_col`. When the column before the
//    stop column has been issued, the bank counter is set to the start
//    column and the bank-D counter to d_col. In the next period rows
//    0..stop_row come from bank D, then all 16 rows of the start column
//    from the bank; that period is longer by stop_row+1 rows, i.e. the
//    column clock is held back by that many rows.
//
// Interface: `step_en` advances the row stream by one row. `enable` low
// clears the controller to entry 0; after `enable` rises two column reads
// prime the pipeline (two enabled clocks) and then one row comes out per
// enabled clock, marked by `row_valid`. The table must stay stable while
// `enable` is high. Restrictions of the scheme: start and stop of one entry
// lie in the same bank with start column <= stop column (< for a partial
// stop), and the stop point of each entry comes at least two columns after
// the point where the previous entry handed over.
//
// From the document: bank organisation, counters, copy bank D, table entry
// format, full/partial jump mechanism, the held column clock. This
// design's own choices: the exact pipeline depth, the bank order after C,
// the per-entry d_col field (the document has one storage input), wrap from
// the last table entry to the first, and the event outputs.
module ram_controller
  import pg_pkg::*;
#(
  parameter int unsigned N_ENTRIES = ENTRIES,
  parameter int unsigned DEPTH     = BANK_COLS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      enable,
  input  logic                      step_en,
  input  table_entry_t              tbl [N_ENTRIES],
  // memory load port
  input  logic                      wr_en,
  input  logic [1:0]                wr_bank,
  input  logic [COL_AW-1:0]         wr_col,
  input  logic [COL_W-1:0]          wr_data,
  // row stream
  output logic [ROW_W-1:0]          row_out,
  output logic                      row_valid,
  // status
  output logic [$clog2(N_ENTRIES)-1:0] entry,
  output logic [9:0]                cycle_count,
  output bank_e                     fmux,
  output logic                      ev_full_jump,
  output logic                      ev_partial_jump,
  output logic                      ev_bank_switch,
  output logic                      ev_entry_next
);

  localparam int unsigned EW = $clog2(N_ENTRIES);
  localparam int unsigned RW = $clog2(ROWS);

  // what a column register holds for one period
  typedef struct packed {
    bank_e          bank;     // pattern bank of the column
    logic           prefix;   // rows 0..plen come from bank D first
    logic [RW-1:0]  plen;     // stop row of the partial column in bank D
  } period_t;

  // ---------------------------------------------------------------- state
  logic [COL_AW-1:0] cnt [NUM_BANKS];   // column counters A..D
  logic [COL_W-1:0]  ram_q [NUM_BANKS]; // SRAM read registers
  logic [COL_W-1:0]  hold  [NUM_BANKS]; // column registers
  period_t           iss, desc_ram, desc_hold;
  logic [1:0]        prime;             // pipeline fill count
  logic              running;
  logic              in_d;              // sending the bank-D part of a period
  logic [RW-1:0]     row;               // row mux counter

  // ------------------------------------------------------------- helpers
  table_entry_t cur;
  logic         bnd;                    // column boundary on this clock
  logic         last_row;
  logic [COL_AW-1:0] issued_col;
  logic         at_full_stop, at_part_stop, at_stop, do_jump;
  bank_e        next_bank;
  bank_e        src;
  logic [RW-1:0] src_row;

  assign cur        = tbl[entry];
  assign issued_col = cnt[iss.bank];

  assign last_row = !in_d && (&row);
  assign bnd      = step_en && enable && (prime != 2'd2 || last_row);

  // stop points are checked on the column issued at this boundary
  assign at_full_stop = (&cur.stop.row) && iss.bank == bank_e'(cur.stop.bank)
                        && issued_col == cur.stop.col;
  assign at_part_stop = !(&cur.stop.row) && iss.bank == bank_e'(cur.stop.bank)
                        && issued_col == cur.stop.col - 1'b1;
  assign at_stop      = at_full_stop || at_part_stop;
  assign do_jump      = at_stop && cycle_count != cur.cycles;

  always_comb begin
    unique case (iss.bank)
      BANK_A:  next_bank = BANK_B;
      BANK_B:  next_bank = BANK_C;
      default: next_bank = BANK_A;
    endcase
  end

  // which column register and row feed the output
  assign src     = in_d ? BANK_D : desc_hold.bank;
  assign src_row = row;
  assign fmux    = src;

  // ------------------------------------------------------------ SRAM banks
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    sram_bank #(.DEPTH(DEPTH), .WIDTH(COL_W)) u_sram (
      .clk     (clk),
      .wr_en   (wr_en && wr_bank == 2'(b)),
      .wr_addr (wr_col),
      .wr_data (wr_data),
      .rd_en   (bnd),
      .rd_addr (cnt[b]),
      .rd_data (ram_q[b])
    );

    always_ff @(posedge clk) begin
      if (bnd) hold[b] <= ram_q[b];
    end
  end

  // ------------------------------------------------ counters and sequencing
  always_ff @(posedge clk) begin
    ev_full_jump    <= 1'b0;
    ev_partial_jump <= 1'b0;
    ev_bank_switch  <= 1'b0;
    ev_entry_next   <= 1'b0;
    if (rst || !enable) begin
      entry       <= '0;
      cycle_count <= '0;
      prime       <= '0;
      for (int b = 0; b < NUM_BANKS; b++) cnt[b] <= '0;
      cnt[tbl[0].start.bank] <= tbl[0].start.col;
      iss       <= '{bank: bank_e'(tbl[0].start.bank), prefix: 1'b0, plen: '0};
      desc_ram  <= '{bank: BANK_A, prefix: 1'b0, plen: '0};
      desc_hold <= '{bank: BANK_A, prefix: 1'b0, plen: '0};
    end else if (bnd) begin
      if (prime != 2'd2) prime <= prime + 2'd1;
      desc_hold <= desc_ram;
      desc_ram  <= iss;
      // choose the column issued at the next boundary
      if (do_jump) begin
        cycle_count              <= cycle_count + 10'd1;
        cnt[cur.start.bank]      <= cur.start.col;
        iss.bank                 <= bank_e'(cur.start.bank);
        if (at_part_stop) begin
          cnt[BANK_D]     <= cur.d_col;
          iss.prefix      <= 1'b1;
          iss.plen        <= cur.stop.row;
          ev_partial_jump <= 1'b1;
        end else begin
          iss.prefix      <= 1'b0;
          ev_full_jump    <= 1'b1;
        end
      end else begin
        iss.prefix <= 1'b0;
        if (at_stop) begin
          entry         <= (entry == EW'(N_ENTRIES - 1)) ? '0 : entry + 1'b1;
          cycle_count   <= '0;
          ev_entry_next <= 1'b1;
        end
        if (issued_col == COL_AW'(DEPTH - 1)) begin
          // last column of a bank: the next bank takes over from column 0
          cnt[next_bank] <= '0;
          iss.bank       <= next_bank;
          ev_bank_switch <= 1'b1;
        end else begin
          cnt[iss.bank] <= issued_col + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------- row sequencing
  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      running   <= 1'b0;
      in_d      <= 1'b0;
      row       <= '0;
      row_out   <= '0;
      row_valid <= 1'b0;
    end else if (step_en) begin
      if (bnd) begin
        // a new column period starts
        running <= (prime != 2'd0);
        in_d    <= (prime != 2'd0) && desc_ram.prefix;
        row     <= '0;
      end else if (in_d && row == desc_hold.plen) begin
        in_d <= 1'b0;
        row  <= '0;
      end else begin
        row <= row + 1'b1;
      end
      row_valid <= running;
      row_out   <= hold[src][ROW_W*src_row +: ROW_W];
    end
  end

endmodule

// pg_top - single-channel 40 Gb/s pattern generator.
//
// The pattern sits in a 4 x 1024 x 128-bit memory. A column counter walks
// the memory one 128-bit column at a time, looping between a start and an
// end column; a 128:16 + 16:1 multiplexer turns each column into 128
// serial bits. The clock first passes through the programmable delay
// (two vernier cells and an inverter chain, sub-picosecond steps, modelled
// behaviourally) and the N-cycle delay, which holds the data path off for
// 0..255 quarter-rate cycles after `start`. A divide-by-1/2/4/8 lets the
// same memory content run at a lower rate. All analogue settings come from
// a 52-bit control shift register; a 128-bit data shift register is the
// write word of the memory. Next to this main data path sits the
// table-driven RAM controller, the proposed extension with loop/jump
// tables and a copy bank for partial-column jumps; it has its own ports.
//
// Clocking: `clk_in_p/n` is the bit clock of this model (one clock per
// output bit at the divide-by-1 setting). Everything in the data path runs
// on the delayed clock that leaves the vernier delay, which is also brought
// out on `clk_out_p/n`. The shift registers run on their own serial
// clocks `sr_cc` (control) and `sr_dc` (data); `load` must come while the
// data register is still. Inputs of the data path should change away from
// the rising clock edge by more than the programmed delay (up to ~110 ps).
//
// Data path timing: with `start` high the first bit appears after N
// quarter-rate ticks (one tick every 4 clocks, N = ncycle_count) and at
// most 3 more clocks: 4N to 4N+3 clocks, depending on the tick phase (3
// clocks for N = 0). Columns
// then follow without gaps, bit 0 of each column first. `start` low holds
// the data path in reset.
//
// The output driver (level shift, swing, high-level and feedback current
// DACs) is analogue and not part of this RTL: the serial data and its DAC
// codes are outputs of this module.
//
// From the document: the block structure and order (clock delay, N-cycle
// delay, counter, RAM, 128:16 mux, 16:1 mux, output driver, serial
// control), every size and the clock ratios. This design's own choices:
// the port list of the control block (the document leaves its parallel
// interface undescribed, so start/end columns, divide ratio and N are
// plain inputs), a single bit-rate clock with enables, and reset behaviour.
module pg_top
  import pg_pkg::*;
(
  // clock in and delayed clock out
  input  logic               clk_in_p,
  input  logic               clk_in_n,
  output logic               clk_out_p,
  output logic               clk_out_n,
  // control
  input  logic               rst,
  input  logic               start,
  input  logic [ADDR_W-1:0]  start_addr,
  input  logic [ADDR_W-1:0]  end_addr,
  input  logic [1:0]         div_sel,
  input  logic [7:0]         ncycle_count,
  // serial set-up
  input  logic               sr_reset,
  input  logic               sr_data,
  input  logic               sr_cc,
  input  logic               sr_dc,
  output logic               sr_out,
  // memory load
  input  logic               load,
  input  logic [ADDR_W-1:0]  load_addr,
  // serial pattern and settings for the output driver
  output logic               dout,
  output logic               dout_valid,
  output logic [7:0]         drv_high_level,
  output logic [7:0]         drv_feedback,
  output logic [7:0]         drv_swing,
  output logic [7:0]         drv_level_shift,
  output logic [1:0]         drv_cascode,
  output logic [ADDR_W-1:0]  col_addr,
  output logic               loop_wrap,
  // table-driven RAM controller
  input  logic               rc_enable,
  input  logic               rc_step_en,
  input  table_entry_t       rc_table [ENTRIES],
  input  logic               rc_wr_en,
  input  logic [1:0]         rc_wr_bank,
  input  logic [COL_AW-1:0]  rc_wr_col,
  input  logic [COL_W-1:0]   rc_wr_data,
  output logic [ROW_W-1:0]   rc_row,
  output logic               rc_row_valid,
  output logic [1:0]         rc_entry,
  output logic [9:0]         rc_cycle_count,
  output bank_e              rc_fmux,
  output logic               rc_ev_full_jump,
  output logic               rc_ev_partial_jump,
  output logic               rc_ev_bank_switch,
  output logic               rc_ev_entry_next
);

  ctrl_regs_t        ctrl;
  logic [COL_W-1:0]  sr_word;
  logic              clk;          // delayed clock of the data path
  logic              dp_rst;       // data path reset
  logic              clk_pass;
  logic              step_en, mux_en;
  logic [1:0]        qr_cnt;
  logic              col_take;
  logic [COL_W-1:0]  col_word;

  // ------------------------------------------------------- serial set-up
  control_sr u_control_sr (
    .sclk (sr_cc),
    .srst (sr_reset),
    .sdi  (sr_data),
    .sdo  (sr_out),
    .regs (ctrl)
  );

  data_sr u_data_sr (
    .sclk (sr_dc),
    .srst (sr_reset),
    .sdi  (sr_data),
    .q    (sr_word)
  );

  // ---------------------------------------------------- variable clock delay
  // path select: bit 0 drives the first mux stage, bit 1 the second
  vernier_delay u_vernier (
    .clk_in_p   (clk_in_p),
    .clk_in_n   (clk_in_n),
    .dac1       (ctrl.vern1),
    .dac2       (ctrl.vern2),
    .stage1_sel (ctrl.delay_sel[0]),
    .stage2_sel (ctrl.delay_sel[1]),
    .clk_out_p  (clk_out_p),
    .clk_out_n  (clk_out_n)
  );

  assign clk          = clk_out_p;
  assign dp_rst       = rst || !start;

  // ------------------------------------------------------ N-cycle delay
  always_ff @(posedge clk) begin
    if (rst) qr_cnt <= '0;
    else     qr_cnt <= qr_cnt + 2'd1;
  end

  ncycle_delay u_ncycle (
    .clk         (clk),
    .rst         (rst),
    .enable      (start),
    .start_count (ncycle_count),
    .qr_tick     (qr_cnt == 2'd3),
    .clk_pass    (clk_pass)
  );

  // ------------------------------------------------ rate divider, counter
  rate_divider u_rate (
    .clk     (clk),
    .rst     (dp_rst || !clk_pass),
    .div_sel (div_sel),
    .step_en (step_en)
  );

  assign mux_en = step_en && clk_pass;

  column_counter #(.AW(ADDR_W)) u_counter (
    .clk        (clk),
    .rst        (dp_rst),
    .run        (clk_pass),
    .step       (col_take),
    .start_addr (start_addr),
    .end_addr   (end_addr),
    .addr       (col_addr),
    .wrapped    (loop_wrap)
  );

  // ---------------------------------------------------------- memory
  // the addressed column is read on every clock, so the word in front of
  // the multiplexer always belongs to the counter's current address
  pattern_ram u_ram (
    .clk     (clk),
    .wr_en   (load),
    .wr_addr (load_addr),
    .wr_data (sr_word),
    .rd_en   (1'b1),
    .rd_addr (col_addr),
    .rd_data (col_word)
  );

  // ------------------------------------------------------ 128:1 mux
  hybrid_mux u_mux (
    .clk        (clk),
    .rst        (dp_rst),
    .step_en    (mux_en),
    .col_in     (col_word),
    .col_take   (col_take),
    .dout       (dout),
    .dout_valid (dout_valid)
  );

  // ------------------------------------------- output driver settings
  assign drv_high_level  = ctrl.hls;
  assign drv_feedback    = ctrl.cfs;
  assign drv_swing       = ctrl.os;
  assign drv_level_shift = ctrl.ls;
  assign drv_cascode     = ctrl.breakdown;

  // --------------------------------------- table-driven RAM controller
  ram_controller u_ram_ctrl (
    .clk             (clk),
    .rst             (rst),
    .enable          (rc_enable),
    .step_en         (rc_step_en),
    .tbl             (rc_table),
    .wr_en           (rc_wr_en),
    .wr_bank         (rc_wr_bank),
    .wr_col          (rc_wr_col),
    .wr_data         (rc_wr_data),
    .row_out         (rc_row),
    .row_valid       (rc_row_valid),
    .entry           (rc_entry),
    .cycle_count     (rc_cycle_count),
    .fmux            (rc_fmux),
    .ev_full_jump    (rc_ev_full_jump),
    .ev_partial_jump (rc_ev_partial_jump),
    .ev_bank_switch  (rc_ev_bank_switch),
    .ev_entry_next   (rc_ev_entry_next)
  );

endmodule

# 40 Gb/s single-channel pattern generator

This is a one-channel digital pattern generator for testing high-speed
serial circuits. A pattern of up to 512 Kbit sits in on-chip SRAM as
128-bit words. The words are serialised by a 128:1 multiplexer tree into
one bit stream at up to 40 Gb/s. The clock that times the stream can be
shifted in two ways:

* by sub-picosecond steps, using two vernier delay cells and an inverter chain;
* by whole cycles, using an N-cycle delay.

A memory smaller than a PRBS sequence can still produce long patterns
because of two mechanisms:

* a column counter that loops between a start column and an end column;
* a table-driven RAM controller with looping, full-column jumps and
  partial-column jumps.

The output stage is an analogue 50-ohm driver with programmable levels. This
RTL produces its serial data and all of its DAC codes, but does not model
the driver itself.

```
 clk_in ─► variable clock delay ─► N-cycle delay ─► column counter ─► SRAM 4 x 1024 x 128
            (vernier x2 + 0/2/4/6       (0..255 quarter-   (start..end loop,   │ 128
             inverter path)              rate cycles)       /1 /2 /4 /8 rate)  ▼
                                                                  128:16 (sixteen 8:1)
 serial control (52 bits) ──► DAC codes: vernier, path,                    │ 16
                              output-driver levels                         ▼
 serial data (128 bits)   ──► SRAM write word                      16:1 ─► dout ─► output driver
                                                                                  (analogue)
 table-driven RAM controller (banks A, B, C + copy bank D) ──► 8-bit row stream
```

## Data path and bit order

`pg_top` has a single bit-rate clock. The delayed clock that leaves the
vernier model drives every register of the data path. The document's chip
uses a half-rate clock and selects the last multiplexer stage on both
edges. Here that is replaced by one clock per output bit plus clock enables.
The logic function and the cycle counts are the same; the electrical timing
is not modelled.

* **Column counter** (`column_counter`). Reset sets it to column 0. Once
  started, it counts up to `end_addr` and then jumps to `start_addr`, and it
  repeats until reset. This means columns below `start_addr` play once, as a
  preamble. The address is 12 bits: {bank, column} across the four banks.
  The counter advances once per 128 bits, which is 312.5 MHz at 40 Gb/s.
* **Memory** (`pattern_ram`, built from `sram_bank`). It has four banks of
  1024 x 128 bits. Reads are synchronous and take one clock.
* **128:1 multiplexer** (`hybrid_mux`). It has two stages:
  * a 7-bit divider counts bit periods;
  * the upper 3 bits select the input of all sixteen 8:1 muxes, producing a
    16-bit lane word every 16 bits;
  * the lower 4 bits select the lane in the 16:1 stage.

  **Bit t of a column is output t-th**: lane k of step j carries bit
  16*j + k. Columns follow each other with no gaps.
* **Rate divider** (`rate_divider`). It produces an enable once every 1, 2,
  4 or 8 clocks (`div_sel` = 0..3). The enable slows the counter and both
  multiplexer stages, so each bit is held for 2^div_sel clocks and the
  memory content does not need to be duplicated.
* **N-cycle delay** (`ncycle_delay`).
  * While `start` is low, an 8-bit counter is loaded with `ncycle_count`.
  * When `start` goes high, the counter counts down on a quarter-rate tick,
    which comes once every 4 clocks.
  * On reaching zero, it lets the data path run.
  * The first output bit appears 4N to 4N+3 clocks after `start`, depending
    on the phase of the tick.
  * In the chip this block gates the half-rate clock. Here it is an enable.

`start` low holds the data path in reset. `rst` resets everything that
runs on the data clock.

## Programmable clock delay

`vernier_delay` is a **behavioural model**. It is a transport delay and is
not synthesizable. It stands in for an analogue circuit:

* Each vernier cell steers a DAC-controlled tail current between a
  one-inverter path and a two-inverter path. This gives a delay between one
  and two gate delays, set by an 8-bit code.
* Two such cells are in series.
* They are followed by a choice of 0, 2, 4 or 6 extra differential
  inverters.
* The inverter count is chosen by three 2:1 muxes in two stages.

The model delays the clock by the chip's simulated values:

| setting | delay added |
|---|---|
| intrinsic (both codes 0, zero-inverter path) | 52.515 ps |
| path: `delay_sel` = 2'b11 / 2'b10 / 2'b01 / 2'b00 | 0 / 14.007 / 30.383 / 45.891 ps (0 / 2 / 4 / 6 inverters) |
| vernier 1, code 1 / 128 / 255 | 0.265 / 0.872 / 4.742 ps |
| vernier 2, code 1 / 128 / 255 | 0.265 / 0.765 / 4.527 ps |

* `delay_sel[0]` is the first-stage select: 1 picks the 0-or-4 pair.
* `delay_sel[1]` is the second-stage select: 1 picks the lower pair.
* Between the listed codes, the vernier delay is interpolated linearly.

The cells are strongly non-linear, with most of the range in the top half
of the code. The model keeps that. It uses a 1 fs time unit.

## Serial set-up

Two shift registers share the data line `sr_data` and the reset
`sr_reset`. Each has its own clock. Both clear synchronously when their
clock rises while `sr_reset` is high.

**Control register** (`control_sr`, clock `sr_cc`, 52 bits). Fields are
shifted in the order below, each MSB first. The field sent first ends at the
top of the chain. `sr_out` returns the last stage, so the old contents come
back while new contents are shifted in. There is no update latch: the
outputs follow the chain.

| order | field | bits | drives |
|---|---|---|---|
| 1 | `ls`  | 8 | level shift (jitter reduction) DAC of the output driver → `drv_level_shift` |
| 2 | `os`  | 8 | output swing DAC → `drv_swing` |
| 3 | `hls` | 8 | high level DAC → `drv_high_level` |
| 4 | `cfs` | 8 | current-feedback (low level) DAC → `drv_feedback` |
| 5 | `breakdown` | 2 | cascode bias of the output pair → `drv_cascode` |
| 6 | `vern2` | 8 | vernier 2 DAC |
| 7 | `vern1` | 8 | vernier 1 DAC |
| 8 | `delay_sel` | 2 | inverter path select |

**Data register** (`data_sr`, clock `sr_dc`, 128 bits). It is sixteen 8-bit
registers. Byte 0 is sent first, MSB first, and lands in bits [127:120].
Byte i lands in bits [127-8i -: 8]. In `pg_top` this register is the SRAM
write word:

1. Shift in a column.
2. Set `load_addr`.
3. Pulse `load` for one data clock.

`load` must come while the register is not shifting.

## Table-driven RAM controller

`ram_controller` is the most involved part. It extends the pattern by
looping and jumping under a table. It has its own memory and its own ports
(`rc_*` on `pg_top`), and produces an 8-bit row stream. It runs side by side
with the main data path rather than replacing its simple counter. The
reason is that the bit-level hand-off between its 8-bit rows and the 16:1
fast stage is not defined.

### Memory and the row stream

* Banks A, B and C (1024 x 128 bits each) hold the pattern.
* They are read as one sequence A0..A1023, B0..B1023, C0..C1023, then A0
  again. This is the bank hand-over.
* Bank D is never played in sequence. Software stores copies of
  partial stop columns there.
* A column leaves as 16 rows of 8 bits, row 0 (bits 7:0) first. One row
  comes out per enabled clock (`step_en`).

The structure per bank is:

1. a 10-bit column counter;
2. the SRAM with its read register;
3. a column register (first flip-flop stage);
4. an 8-bit row selection.

A final 4:1 bank mux (`fmux`) and an output register (second flip-flop
stage) follow. Every bank is read at each column boundary, and the muxes
decide which data goes on. This is cheaper than steering the addresses,
because the next column is always already in its register.

### The table

There are four entries (`table_entry_t`). Each entry has:

* `start`: 12 bits, {bank 2, column 10};
* `stop`: 16 bits, {row 4, bank 2, column 10};
* `cycles`: 10 bits;
* `d_col`: the bank-D column that holds the copy of a partial stop column.

Entry e plays on until its stop point. Then it jumps back to its start
column, `cycles` times in all, so the loop body plays `cycles`+1 times. On
the pass after the last jump it runs on past the stop point. At that
point, entry e+1 takes over; after entry 3 comes entry 0 again.

* Stop row 15 means the loop ends at the end of the stop column. This is a
  **full-column stop**.
* Any other stop row r means the loop ends after row r of the stop column.
  This is a **partial-column stop**.

### Why bank D exists

A column read started at one column boundary is used during the period
after the next boundary. So the controller must choose each column one
column ahead:

* **Full jump.** The bank counter is set back to `start` when the stop
  column has been issued. The start column then follows the stop column
  directly.
* **Partial jump.** The problem is that rows 0..r of the stop column and
  all of the start column are needed back to back from the *same* bank.
  One bank cannot deliver both at once. The controller handles this with
  bank D and a longer period:
  1. When the column *before* the stop column has been issued, the
     controller sets the bank counter to `start` and the bank-D counter to
     `d_col`.
  2. In the next column period, rows 0..r come from bank D.
  3. All 16 rows of the start column then come from the pattern bank.
  4. That period is r+1 rows longer. The column clock is held back by that
     many rows, so the stream has no gap.

### Timing and interface

* `enable` low clears the controller to entry 0.
* After `enable` rises, two enabled clocks prime the pipeline.
* After that, one row comes out per enabled clock, marked by `row_valid`.
* The table must stay stable while `enable` is high.
* Status outputs: `entry`, `cycle_count` and `fmux`.
* Event pulses: `ev_full_jump`, `ev_partial_jump`, `ev_bank_switch` and
  `ev_entry_next`. They fire when the decision is taken, which is up to two
  columns ahead of the data.

### Restrictions

The table must obey these rules. The controller does not check them.

* Start and stop of one entry lie in the same pattern bank.
* The start column is at or below the stop column. For a partial stop it
  must be strictly below.
* The stop point of an entry lies at least two columns after the point
  where the previous entry handed over.
* Bank D is loaded with the stop column at `d_col` before `enable`.

## Files

| file | content |
|---|---|
| `rtl/pg_pkg.sv` | sizes, bank enum, table entry and control register structs |
| `rtl/pg_top.sv` | the whole generator |
| `rtl/control_sr.sv`, `rtl/data_sr.sv` | serial registers |
| `rtl/vernier_delay.sv` | clock delay (behavioural model) |
| `rtl/ncycle_delay.sv`, `rtl/rate_divider.sv`, `rtl/column_counter.sv` | clock and address control |
| `rtl/pattern_ram.sv`, `rtl/sram_bank.sv` | pattern memory |
| `rtl/hybrid_mux.sv` | 128:1 multiplexer |
| `rtl/ram_controller.sv` | table-driven controller |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

All parameters default to the chip's sizes: 4 x 1024 x 128 memory,
sixteen 8:1 muxes plus a 16:1 mux, 8-bit N count, 4 table entries and 16
rows of 8 bits.

## Simulation

Each testbench is self-contained. Compile the package first, then the
rest:

```
verilator --binary --timing -Wno-fatal --top-module tb_pg_top \
    rtl/pg_pkg.sv $(ls rtl/*.sv | grep -v pg_pkg) tb/tb_pg_top.sv
./obj_dir/Vtb_pg_top
```

`--timing` is needed because of the delay model and the testbench clocks.
Every testbench ends with the line `TB_RESULT checks=<n> failures=<n>`.
Each has a watchdog that counts a failure if it hangs.

`tb_pg_top` runs the top at its default sizes in under a second. It checks:

* the control register fields and read-back;
* the clock delay through the model for one setting (≈72.03 ps);
* loading six columns through the data register;
* N = 5 start latency;
* the serial stream with a loop over columns 2..5;
* a restart at quarter rate (every bit held four clocks);
* about 110 000 rows of the table-driven controller, against a reference
  walk through the banks.

It counts each mechanism and fails if any never happened: clock delay,
N-cycle delay, loop jump, rate division, full jump, partial jump, bank
hand-over and table-entry change. `tb_ram_controller` drives the
controller on its own for 120 000 rows with an irregular `step_en`. It
checks every row, the output rate, and the number of jumps against the
reference.

Two more testbenches cover the ends of the ranges:

* `tb_pg_top_fullmem` fills all 4096 columns (512 Kbit) through the serial
  data port. It plays every bit once across all bank boundaries, then a
  loop at the top of the address range. It uses the longest clock delay
  (107.675 ps) and N = 255, so the first bit comes 1020 to 1023 clocks
  after `start`. It takes about 2 s.
* `tb_ram_controller_cases` runs two basic loops twice around the table:
  * a full-column loop from column 0 to the end of column 31 in bank B
    (stop code `1111_01_0000011111`);
  * a partial loop ending after row 7 of column 31 in bank A.

  It checks how `cycle_count` and `entry` advance. It also checks that the
  final mux selects bank D for exactly eight rows at every partial jump,
  and that no row is lost.

## Departures and limits

* **Analogue parts are not modelled.** This covers the output driver,
  the clock buffers, the ECL-to-CMOS level conversion and the shift-register
  input level shifter. Their digital inputs are ports of `pg_top`.
* **The chip's parallel control port is not modelled.** It has an 8-bit
  address and 8-bit data. Its register map is not defined, so the start and
  end columns, the divide ratio and N are plain inputs of `pg_top`.
* **One clock per bit.** This replaces the half-rate clock with both-edge
  selection. The 16:1 stage is one selection, not a tree of 4:1 bipolar
  muxes. Timing at 40 GHz is not represented.
* **The column counter is 12 bits wide** and covers all four banks. The
  chip's counter was described as narrower, which cannot reach 1024 columns.
* **Vernier range.** The model follows the simulated vernier values, up to
  about 4.7 ps per cell. It does not follow the 8 ps per cell quoted as a
  design target. The total programmable range above the intrinsic delay is
  0 to 55.16 ps. The two cells are added; their measured combined value at
  full code is somewhat larger.
* **Controller choices made here.** These are not given by the source
  design:
  * the controller's `cycles` counts jumps back to start;
  * the table wraps from entry 3 to entry 0;
  * each entry carries its own bank-D column;
  * banks hand over in the order A→B→C→A;
  * how the row stream would feed the 16:1 stage.
* **Memory size.** The memory holds 512 Kbit (393 Kbit of pattern banks in
  the table-driven controller). A non-repeating PRBS of 2^20 bits or more
  does not fit. It can only be built from loops and jumps.

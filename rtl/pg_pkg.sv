// pg_pkg - constants and types shared by the 40 Gb/s pattern generator.
//
// The pattern memory is organised as columns of 128-bit words (four banks
// of 1024 columns each). A column is serialised into 128 consecutive output
// bits by a 128:16 CMOS multiplexer followed by a 16:1 high-speed
// multiplexer. These sizes, the 8-bit DAC codes and the 2-bit path select
// follow the document. The packing order of the control shift register
// follows the order in which the test software shifts the fields in.
// The table-entry layout (12-bit start, 16-bit stop, 10-bit cycle count,
// 10-bit bank-D storage column) is the document's; the order of fields inside the struct is this
// design's own choice.
package pg_pkg;

  // Pattern memory geometry
  localparam int unsigned COL_W      = 128;  // bits per column word
  localparam int unsigned BANK_COLS  = 1024; // columns per SRAM bank
  localparam int unsigned NUM_BANKS  = 4;    // banks A, B, C, D
  localparam int unsigned COL_AW     = 10;   // column address width in a bank
  localparam int unsigned ADDR_W     = 12;   // {bank, column}
  localparam int unsigned LANES      = 16;   // outputs of the 128:16 mux
  localparam int unsigned MUX1_RATIO = COL_W / LANES; // 8:1 CMOS muxes

  // Table-driven RAM controller: a column is cut into 16 rows of 8 bits
  localparam int unsigned ROWS       = 16;
  localparam int unsigned ROW_W      = COL_W / ROWS;
  localparam int unsigned ENTRIES    = 4;

  // Control shift register length (2+8+8+2+8+8+8+8)
  localparam int unsigned CTRL_BITS  = 52;

  // Banks of the table-driven controller
  typedef enum logic [1:0] {
    BANK_A = 2'd0,
    BANK_B = 2'd1,
    BANK_C = 2'd2,
    BANK_D = 2'd3
  } bank_e;

  // Stop register: {stop row, stop bank, stop column}
  typedef struct packed {
    logic [3:0]  row;
    logic [1:0]  bank;
    logic [9:0]  col;
  } stop_t;

  // Start register: {start bank, start column}
  typedef struct packed {
    logic [1:0]  bank;
    logic [9:0]  col;
  } start_t;

  // One entry of the loop/jump table
  typedef struct packed {
    start_t      start;
    stop_t       stop;
    logic [9:0]  cycles;   // number of jumps back to start before moving on
    logic [9:0]  d_col;    // column of bank D holding a copy of a partial stop column
  } table_entry_t;

  // Decoded control shift register
  typedef struct packed {
    logic [7:0] ls;        // SR8: level shift (jitter reduction) DAC
    logic [7:0] os;        // SR7: output swing DAC
    logic [7:0] hls;       // SR5: high level set DAC
    logic [7:0] cfs;       // SR6: current feedback source (low level) DAC
    logic [1:0] breakdown; // SR4: cascode bias select of the output stage
    logic [7:0] vern2;     // SR3: vernier 2 DAC
    logic [7:0] vern1;     // SR2: vernier 1 DAC
    logic [1:0] delay_sel; // SR1: inverter chain path select
  } ctrl_regs_t;

endpackage

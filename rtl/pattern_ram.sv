// pattern_ram - the pattern memory of the main data path: four SRAM banks
// of 1024 columns x 128 bits, addressed as one 4096-column memory.
//
// Address bits [11:10] pick the bank and [9:0] the column in it, the same
// {bank, column} split the document uses for its start register. Writes go
// to one bank; a read enables only the addressed bank and its word is
// returned one clock later on `rd_data` (synchronous read, see sram_bank).
//
// From the document: four banks of 1024 x 128 bits. This design's own
// choice: the flat 12-bit address and the single read/write port pair.
module pattern_ram
  import pg_pkg::*;
#(
  parameter int unsigned BANKS = NUM_BANKS,
  parameter int unsigned DEPTH = BANK_COLS,
  parameter int unsigned WIDTH = COL_W,
  parameter int unsigned BW    = $clog2(BANKS),
  parameter int unsigned CW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [BW+CW-1:0] wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [BW+CW-1:0] rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] bank_q [BANKS];
  logic [BW-1:0]    rd_bank_q;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sram_bank #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_bank (
      .clk     (clk),
      .wr_en   (wr_en && wr_addr[BW+CW-1:CW] == BW'(b)),
      .wr_addr (wr_addr[CW-1:0]),
      .wr_data (wr_data),
      .rd_en   (rd_en && rd_addr[BW+CW-1:CW] == BW'(b)),
      .rd_addr (rd_addr[CW-1:0]),
      .rd_data (bank_q[b])
    );
  end

  // remember which bank answered the last read
  always_ff @(posedge clk) begin
    if (rd_en) rd_bank_q <= rd_addr[BW+CW-1:CW];
  end

  assign rd_data = bank_q[rd_bank_q];

endmodule

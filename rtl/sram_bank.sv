// sram_bank - one pattern SRAM bank: DEPTH columns of WIDTH bits.
//
// Written as a memory array so that a tool can map it onto an SRAM macro.
// One synchronous write port and one synchronous read port: the word at
// `rd_addr` appears on `rd_data` after the rising edge on which `rd_en` is
// high and holds until the next read. The real bank has an access time of
// about 3 ns, i.e. roughly one column period of the 40 Gb/s stream; the
// register on the read port stands for that one-period read.
//
// From the document: 1024 columns of 128 bits per bank. This design's own
// choice: the port set (1R1W, synchronous) and no reset of the contents.
module sram_bank #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

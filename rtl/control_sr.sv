// control_sr - serial control register of the pattern generator.
//
// A 52-bit shift register loads every analogue setting of the chip: the
// 2-bit inverter-chain path select (SR1), the two 8-bit vernier DAC codes
// (SR2, SR3), the 2-bit cascode bias select of the output stage (SR4) and
// the four 8-bit output-driver DAC codes (SR5-SR8: high level, current
// feedback/low level, output swing, level shift). Bits enter at `sdi`, MSB
// of each field first, on the rising edge of `sclk`; the field shifted in
// first ends at the far end of the chain. `sdo` is the last stage, so old
// contents can be read back while new contents are shifted in.
//
// Timing: one bit per `sclk` rising edge; `srst` is synchronous to `sclk`
// and clears the chain (the test software holds reset and pulses the clock
// once). The parallel outputs follow the chain directly: there is no
// separate update latch.
//
// From the document: the field list, widths and shift order. This design's
// own choice: which end is the serial output, and the synchronous reset to
// all zeros.
module control_sr
  import pg_pkg::*;
(
  input  logic       sclk,
  input  logic       srst,
  input  logic       sdi,
  output logic       sdo,
  output ctrl_regs_t regs
);

  logic [CTRL_BITS-1:0] chain;

  always_ff @(posedge sclk) begin
    if (srst) chain <= '0;
    else      chain <= {chain[CTRL_BITS-2:0], sdi};
  end

  assign sdo  = chain[CTRL_BITS-1];
  assign regs = ctrl_regs_t'(chain);

endmodule

// data_sr - serial data register that stands in for one 128-bit column.
//
// Sixteen 8-bit registers in one 128-bit chain. The test software shifts
// byte 0 first, MSB first, on the rising edge of `sclk`, so after 128
// clocks byte i sits in q[127-8i -: 8]. In the pattern generator the
// register serves as the write-data word for the pattern memory: after it
// is filled, a load strobe writes it into one memory column.
//
// Timing: one bit per `sclk` rising edge; `srst` is synchronous and clears
// the chain.
//
// From the document: 16 bytes, 128 bits, byte-serial MSB-first loading.
// This design's own choice: the synchronous clear and the byte placement.
module data_sr
  import pg_pkg::*;
(
  input  logic             sclk,
  input  logic             srst,
  input  logic             sdi,
  output logic [COL_W-1:0] q
);

  always_ff @(posedge sclk) begin
    if (srst) q <= '0;
    else      q <= {q[COL_W-2:0], sdi};
  end

endmodule

// column_counter - address counter of the pattern memory with looping.
//
// After `rst` the counter is at column 0. It stands still until `run` is
// high; then every `step` moves it one column on. When the address equals
// the end register `end_addr`, the next step loads the start register
// `start_addr` instead, so the pattern from start_addr to end_addr repeats
// until the next reset. Columns below start_addr are played once, before
// the first loop. One column holds 128 bits, so at 40 Gb/s the counter
// steps at only 312.5 MHz.
//
// Timing: `addr` changes on the clock edge on which `step` and `run` are
// both high. A wrap past the last column of the memory goes back to 0.
// `wrapped` pulses on each jump from end_addr back to start_addr.
//
// From the document: reset, start, end register and start register, and
// the jump back to start. This design's own choice: reset to column 0 and
// the full 12-bit {bank, column} width (the document also speaks of an
// 8-bit column counter, too narrow for four banks of 1024 columns).
module column_counter #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic          step,
  input  logic [AW-1:0] start_addr,
  input  logic [AW-1:0] end_addr,
  output logic [AW-1:0] addr,
  output logic          wrapped
);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr    <= '0;
      wrapped <= 1'b0;
    end else begin
      wrapped <= 1'b0;
      if (run && step) begin
        if (addr == end_addr) begin
          addr    <= start_addr;
          wrapped <= 1'b1;
        end else begin
          addr    <= addr + 1'b1;
        end
      end
    end
  end

endmodule

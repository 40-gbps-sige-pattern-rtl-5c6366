// ncycle_delay - "N" cycle clock delay: holds the clock off for a
// programmable number (0..255) of quarter-rate clock cycles.
//
// Start-count control: while `enable` is low the 8-bit counter is loaded
// with `start_count`. Once `enable` is high the counter counts down by one
// on each quarter-rate tick (`qr_tick`) until it reaches zero. Detection
// logic: the count being zero with `enable` high. Clock feed-through: from
// then on `clk_pass` is high and the half-rate clock is let through to the
// rest of the chip; here `clk_pass` is a clock enable for the logic behind.
//
// Timing: with `enable` rising before tick 1, `clk_pass` rises on the clock
// after the N-th tick, so the delay is N quarter-rate cycles.
// `start_count` = 0 passes the clock on the clock after `enable` rises.
// Dropping `enable` stops the clock again and reloads the counter.
//
// From the document: the 8-bit down counter, the load/count/detect/
// feed-through structure and the quarter-rate count clock. This design's
// own choice: the enable form of the feed-through and the registered
// detect.
module ncycle_delay (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic [7:0] start_count,
  input  logic       qr_tick,
  output logic       clk_pass
);

  logic [7:0] count;

  always_ff @(posedge clk) begin
    if (rst || !enable)       count <= start_count;
    else if (qr_tick && count != 8'd0) count <= count - 8'd1;
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) clk_pass <= 1'b0;
    else                clk_pass <= (count == 8'd0);
  end

endmodule

// rate_divider - programmable divide-by-1/2/4/8 of the data-path clock.
//
// The pattern generator can run below its full rate without storing each
// bit several times: the clock that steps the column counter and the
// multiplexers is divided by 1, 2, 4 or 8. Here the division is made as a
// clock enable: `step_en` is high on one clock out of 2**div_sel, so every
// output bit is held for that many bit periods.
//
// Timing: `step_en` is combinational from a free-running 3-bit counter; it
// is high every clock when div_sel = 0. A synchronous `rst` restarts the
// counter so that the first enable comes on the first clock after reset.
//
// From the document: the four ratios. This design's own choice: realising
// the divided clock as an enable of the full-rate clock.
module rate_divider (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] div_sel,  // 0: /1, 1: /2, 2: /4, 3: /8
  output logic       step_en
);

  logic [2:0] cnt;
  logic [2:0] mask;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 3'd1;
  end

  always_comb begin
    unique case (div_sel)
      2'd0:    mask = 3'b000;
      2'd1:    mask = 3'b001;
      2'd2:    mask = 3'b011;
      default: mask = 3'b111;
    endcase
  end

  assign step_en = (cnt & mask) == 3'b000;

endmodule

// hybrid_mux - 128:1 multiplexer that turns one 128-bit column per 128 bit
// periods into a serial bit stream.
//
// Two stages, as on the chip: a 128:16 stage made of sixteen 8:1 muxes
// (the slow CMOS part, one new 16-bit lane word per 16 bit periods) and a
// 16:1 stage (the fast bipolar part, one bit per bit period). A 7-bit
// divider counts bit periods: its low 4 bits select the lane of the 16:1
// stage, its high 3 bits the input of every 8:1 mux, and its wrap marks the
// column boundary. Bits leave in column order: bit t of a column is output
// t+1 enabled clocks after the column was taken, so lane k of step j
// carries col[16*j + k].
//
// Interface: `step_en` advances everything by one bit period (tie high for
// the full rate). `col_in` must hold the next column on the clock on which
// `col_take` is high; that column is captured into the column register
// (the flip-flops between memory and multiplexer) and its first lane word
// is loaded at once. `dout_valid` rises with the first bit of the first
// column after reset.
//
// From the document: the 128:16 then 16:1 split, sixteen 8:1 muxes, the
// divided clock for the slow stage. This design's own choice: the bit
// order inside a column and the single-clock enable scheme (the chip
// clocks its last stage on both edges of a half-rate clock).
module hybrid_mux
  import pg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             step_en,
  input  logic [COL_W-1:0] col_in,
  output logic             col_take,
  output logic             dout,
  output logic             dout_valid
);

  localparam int unsigned SW = $clog2(MUX1_RATIO); // 8:1 select width
  localparam int unsigned LW = $clog2(LANES);      // 16:1 select width

  logic [SW+LW-1:0] cnt;        // bit position in the column
  logic [COL_W-1:0] col_q;      // column register
  logic [LANES-1:0] lanes_q;    // 16-bit word between the two stages
  logic [SW-1:0]    step_sel;   // select of the sixteen 8:1 muxes
  logic [LANES-1:0] lane_word;  // output of the 128:16 stage
  logic             started;

  assign step_sel = cnt[SW+LW-1:LW] + 1'b1;
  assign col_take = step_en && (&cnt);

  // 128:16 stage: sixteen 8:1 muxes, mux k picks col_q[16*sel + k]
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      lane_word[k] = col_q[LANES*step_sel + k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '1;        // first enabled clock takes a column
      col_q      <= '0;
      lanes_q    <= '0;
      dout       <= 1'b0;
      dout_valid <= 1'b0;
      started    <= 1'b0;
    end else if (step_en) begin
      cnt  <= cnt + 1'b1;
      // 16:1 stage
      dout       <= lanes_q[cnt[LW-1:0]];
      dout_valid <= started;
      if (col_take) begin
        col_q   <= col_in;
        lanes_q <= col_in[LANES-1:0];
        started <= 1'b1;
      end else if (&cnt[LW-1:0]) begin
        lanes_q <= lane_word;
      end
    end
  end

endmodule

// vernier_delay - behavioural model (not synthesizable logic) of the
// programmable clock delay: two vernier delay cells in series followed by
// a choice of four inverter-chain paths.
//
// On the chip each vernier cell steers a DAC-controlled tail current
// between a one-inverter and a two-inverter path, giving a delay between
// one and two gate delays set by an 8-bit code. Behind the two cells the
// clock passes through 0, 2, 4 or 6 extra differential inverters, chosen
// by three 2:1 muxes: the two first-stage muxes pick 0-or-2 and 4-or-6
// inverters under `stage1_sel` (1: 0 or 4), the second-stage mux picks
// the low pair under `stage2_sel` (1: 0 or 2). This model reproduces the
// resulting delay, not the circuit: the input clock is copied to the
// output after
//   T = T0 + Tpath(stage1_sel, stage2_sel) + Tv(dac1) + Tv2(dac2)
// where T0 and the path delays are the simulated values of the chip
// (52.515 ps intrinsic; +14.007, +30.383, +45.891 ps for 2, 4, 6
// inverters) and the vernier delays are interpolated linearly between the
// simulated points at codes 0, 1, 128 and 255 (up to 4.742 ps and 4.527 ps
// for the two cells). The cells are not linear; the model keeps that.
//
// Interface: differential clock in and out, two 8-bit DAC codes, two path
// selects. Timing: transport delay, so every edge is kept.
//
// From the document: structure, path selects and all delay values. This
// model's own choice: linear interpolation between the simulated vernier
// points and adding the two vernier delays.
module vernier_delay (
  input  logic       clk_in_p,
  input  logic       clk_in_n,
  input  logic [7:0] dac1,
  input  logic [7:0] dac2,
  input  logic       stage1_sel,  // 1: 0 or 4 inverters, 0: 2 or 6
  input  logic       stage2_sel,  // 1: 0 or 2 inverters, 0: 4 or 6
  output logic       clk_out_p,
  output logic       clk_out_n
);
  timeunit 1fs;
  timeprecision 1fs;

  // delays in femtoseconds
  localparam int T0_FS = 52515;
  localparam int PATH_FS [4] = '{0, 14007, 30383, 45891}; // 0,2,4,6 inverters

  // vernier curve: simulated points (code, fs)
  function automatic int vern_fs(input logic [7:0] code, input int p1,
                                 input int p128, input int p255);
    int c;
    c = int'(code);
    if (c == 0)        return 0;
    else if (c <= 128) return p1 + (p128 - p1) * (c - 1) / 127;
    else               return p128 + (p255 - p128) * (c - 128) / 127;
  endfunction

  logic [1:0] path_idx;
  int         delay_fs;

  always_comb begin
    path_idx = {!stage2_sel, !stage1_sel};
    delay_fs = T0_FS + PATH_FS[path_idx]
             + vern_fs(dac1, 265, 872, 4742)
             + vern_fs(dac2, 265, 765, 4527);
  end

  always @(clk_in_p) clk_out_p <= #(delay_fs) clk_in_p;
  always @(clk_in_n) clk_out_n <= #(delay_fs) clk_in_n;

endmodule

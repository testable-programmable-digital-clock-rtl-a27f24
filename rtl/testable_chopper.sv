// testable_chopper - testable programmable chopper with four selections.
//
// Inverted-reconvergence element: the undelayed clock meets inverted delayed
// copies in one AND, so a positive pulse is chopped to a pulse of width D at
// its leading edge. Every selection other than Sel = 11 keeps the first tap,
// which alone sets the chopped width, so the selections differ only in which
// further taps take part; Sel = 11 removes all taps and passes the clock
// unchopped. This follows from the gate structure of the method, which inverts
// the delayed leg of the shrinker and keeps all else.
//
// Sel_j is sel[j]. Functional operation holds test_sel at 0; the number of
// delays i then follows the minimized decode, with Sel_0 as the most
// significant code bit:  Sel0 Sel1 = 11 -> 0,  10 -> D,  01 -> 2D,  00 -> 3D.
// For test, Test_Sel degates AND inputs (Y0 = TS0+TS1 the undelayed clock,
// Y1 = TS0 tap 1, Y2 = TS1 tap 2; tap 3 enters ungated) so
// that every line can be set to 0 and 1 and observed with static patterns.
// Timing: D is DELAY_TICKS periods of the sampling clock tick; clk_out is
// combinational from clk_in. See pulse_shaper for the structure. The element
// follows the method's gate structure; the delay model is this design's own.
module testable_chopper
  import clkpc_pkg::*;
#(
  parameter int unsigned SEL_W       = 2,
  parameter int unsigned DELAY_TICKS = 1
) (
  input  logic             tick,
  input  logic             rst,
  input  logic             clk_in,
  input  logic [SEL_W-1:0] sel,
  input  logic [SEL_W-1:0] test_sel,
  output logic             clk_out
);

  pulse_shaper #(
    .SEL_W       (SEL_W),
    .SHAPE       (SHAPE_CHOP),
    .DELAY_TICKS (DELAY_TICKS)
  ) u_shaper (
    .tick     (tick),
    .rst      (rst),
    .clk_in   (clk_in),
    .sel      (sel),
    .test_sel (test_sel),
    .clk_out  (clk_out)
  );

endmodule

// testable_shrinker - testable programmable shrinker with four selections.
//
// Shrinks a positive clock pulse (its leading edge moves later) by 0, D, 2D
// or 3D for the selections tabled below; a negative pulse is stretched by the same
// amount. Built from the generic element with no inversions: the undelayed clock
// and the delayed chain taps meet in one AND.
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
module testable_shrinker
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
    .SHAPE       (SHAPE_SHRINK),
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

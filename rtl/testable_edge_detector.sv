// testable_edge_detector - testable edge detector (XOR reconvergence).
//
// The output is the XOR of the clock and the clock delayed by D, so every edge
// of the input clock produces an output pulse of width D. For static test each
// XOR leg passes through a two-input AND with its own test input: test1 gates
// the undelayed leg and test2 the delayed leg. Forcing either leg to 0 lets all
// four input patterns reach the XOR; test1 = test2 = 1 is functional operation.
// There is no programmability, as the method leaves it out for this element.
//
// Timing: D is DELAY_TICKS periods of the sampling clock tick; clk_out is
// combinational from clk_in, the test inputs and the delay flops. The gate
// structure follows the method; the delay model and reset are this design's own.
module testable_edge_detector #(
  parameter int unsigned DELAY_TICKS = 1
) (
  input  logic tick,
  input  logic rst,
  input  logic clk_in,
  input  logic test1,   // gates the undelayed leg, 1 in functional operation
  input  logic test2,   // gates the delayed leg, 1 in functional operation
  output logic clk_out
);

  logic delayed;
  logic leg_now;       // undelayed leg after its test gate
  logic leg_late;      // delayed leg after its test gate

  delay_element #(.DELAY_TICKS(DELAY_TICKS)) u_delay (
    .tick (tick), .rst (rst), .d (clk_in), .q (delayed)
  );

  assign leg_now  = test1 & clk_in;
  assign leg_late = test2 & delayed;
  assign clk_out  = leg_now ^ leg_late;

endmodule

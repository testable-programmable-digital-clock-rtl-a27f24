// delay_element - fixed delay D of the clock pulse control elements.
//
// The method treats every delay block, and every OR gate of a selectable delay
// chain, as a precision delay D while all other gates have zero delay. This
// model keeps that timing in synthesizable form: time advances in periods of a
// sampling clock `tick`, and D is DELAY_TICKS of them, built as a shift
// register. q therefore equals d as it was DELAY_TICKS tick edges earlier.
// The sampling clock, the shift-register form and the synchronous active-high
// reset (which clears the stages to 0) are this design's own choices; the
// method only asks for a fixed, well-controlled delay.
module delay_element #(
  parameter int unsigned DELAY_TICKS = 1   // length of D in tick periods, >= 1
) (
  input  logic tick,
  input  logic rst,
  input  logic d,
  output logic q
);

  logic [DELAY_TICKS-1:0] stage;

  always_ff @(posedge tick) begin
    if (rst) stage <= '0;
    else     stage <= DELAY_TICKS'({stage, d});
  end

  assign q = stage[DELAY_TICKS-1];

endmodule

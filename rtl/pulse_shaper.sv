// pulse_shaper - generic testable programmable pulse-shaping element.
//
// The clock runs through a chain of N_SEL-1 two-input OR gates, each a delay D
// (each OR is followed by a delay_element). OR stage i has the select-decoder
// term X_i as its second input: X_i = 1 forces that stage and every later one
// to 1, the non-controlling value of the reconvergent AND, so the chain is cut
// after i delays. The reconvergent AND receives the undelayed clock and taps
// 1 .. N_SEL-1 of the chain. Each of its inputs except the last tap passes a
// two-input OR with a test-decoder term: the undelayed clock with Y_0 and tap
// i with Y_i. The last (most delayed) tap enters ungated. With Test_Sel = 0
//     out = c0 & c0(t-D) & ... & c0(t-iD)      (i selected by Sel)
// so an edge of the undelayed clock sets one output edge and the most delayed
// tap still in use sets the other. In test, Y_i degates (forces to 1) AND
// inputs and X_i forces chain stages, so any single line can be isolated on
// the path to the output: every stuck-at fault of the element is visible to
// static patterns, including a delayed leg stuck at the non-controlling 1.
//
// SHAPE chooses where inverters sit, giving the three programmable elements:
//   SHAPE_SHRINK  : no inversion. A positive pulse of width W comes out with
//                   its leading edge delayed by iD, width W-iD.
//   SHAPE_STRETCH : clock input and output inverted (OR reconvergence). A
//                   positive pulse comes out of width W+iD.
//   SHAPE_CHOP    : only the clock entering the chain is inverted, so the
//                   undelayed clock meets inverted delayed copies. The output
//                   pulse starts at the clock's rising edge and ends at the
//                   first tap, D later; Sel = all ones (i = 0) passes the
//                   clock unchopped.
// Requires pulse width W > (N_SEL-1)*D, as the method states.
//
// Timing: tick is the sampling clock of the delay model (see delay_element);
// clk_out is combinational from clk_in, sel and test_sel and from the delay
// flops. The chain, the decoders, the pairing of Y terms with AND inputs and
// the inversions follow the method's gate diagrams; the reset and the
// sampled-time delay model are this design's own choices.
module pulse_shaper
  import clkpc_pkg::*;
#(
  parameter int unsigned SEL_W       = 2,
  parameter shape_e      SHAPE       = SHAPE_SHRINK,
  parameter int unsigned DELAY_TICKS = 1
) (
  input  logic             tick,
  input  logic             rst,
  input  logic             clk_in,
  input  logic [SEL_W-1:0] sel,       // sel[j] is Sel_j
  input  logic [SEL_W-1:0] test_sel,  // test_sel[j] is Test_Sel_j
  output logic             clk_out
);

  localparam int unsigned N_SEL = 2 ** SEL_W;

  logic [N_SEL-2:0] x;              // chain force terms
  logic [N_SEL-2:0] y;              // tap degate terms
  logic             direct;         // undelayed leg into the AND
  logic [N_SEL-1:0] chain;          // chain[0] = chain input, chain[i] = tap i
  logic [N_SEL-2:0] gated;          // AND inputs after the test OR gates
  logic             reconv;         // reconvergent AND output

  select_decoder #(.SEL_W(SEL_W)) u_dec_sel (
    .sel (sel),
    .x   (x)
  );

  test_select_decoder #(.SEL_W(SEL_W)) u_dec_test (
    .test_sel (test_sel),
    .y        (y)
  );

  always_comb begin
    unique case (SHAPE)
      SHAPE_STRETCH: begin direct = ~clk_in; chain[0] = ~clk_in; end
      SHAPE_CHOP:    begin direct =  clk_in; chain[0] = ~clk_in; end
      default:       begin direct =  clk_in; chain[0] =  clk_in; end
    endcase
  end

  for (genvar i = 0; i < N_SEL - 1; i++) begin : g_stage
    delay_element #(.DELAY_TICKS(DELAY_TICKS)) u_or_delay (
      .tick (tick),
      .rst  (rst),
      .d    (chain[i] | x[i]),
      .q    (chain[i+1])
    );
  end

  // Y_0 degates the undelayed clock, Y_i (i >= 1) degates tap i.
  assign gated[0] = direct | y[0];
  for (genvar i = 1; i < N_SEL - 1; i++) begin : g_gate
    assign gated[i] = chain[i] | y[i];
  end

  assign reconv  = (&gated) & chain[N_SEL-1];
  assign clk_out = (SHAPE == SHAPE_STRETCH) ? ~reconv : reconv;

endmodule

// tclk_top - a testable clock path built from the clock pulse control elements.
//
// A clock system positions one reference edge early (regional tuning with a
// programmable delay line) and shapes pulse widths late, next to the
// sequential elements (local clock generation). This top puts the testable
// elements in that order: the clock input passes a two-input AND with a
// controllable level (clk_in_en) so a static test can hold the clock input,
// then the testable programmable delay line, whose output feeds, side by side,
// the testable shrinker, stretcher, chopper and edge detector. Every selection
// and test input of every element is a port, so each can be programmed and
// tested on its own. The chaining of the elements is this design's own
// illustration of a clock path; each element follows the method.
//
// Timing: tick is the sampling clock of the delay model, D = DELAY_TICKS of
// its periods; rst clears the delay flops. Outputs are combinational from the
// inputs and the delay flops. A pulse of width W at clk_in reaches tuned_clk
// (dl_sel+1)*D later; the shapers then act on tuned_clk.
module tclk_top #(
  parameter int unsigned DL_SEL_W    = 2,
  parameter int unsigned PS_SEL_W    = 2,
  parameter int unsigned DELAY_TICKS = 1
) (
  input  logic                tick,
  input  logic                rst,
  input  logic                clk_in,
  input  logic                clk_in_en,
  input  logic                dl_mode,
  input  logic                dl_parity,
  input  logic [DL_SEL_W-1:0] dl_sel,
  input  logic [PS_SEL_W-1:0] shr_sel,
  input  logic [PS_SEL_W-1:0] shr_test_sel,
  input  logic [PS_SEL_W-1:0] str_sel,
  input  logic [PS_SEL_W-1:0] str_test_sel,
  input  logic [PS_SEL_W-1:0] chp_sel,
  input  logic [PS_SEL_W-1:0] chp_test_sel,
  input  logic                ed_test1,
  input  logic                ed_test2,
  output logic                tuned_clk,
  output logic                shrunk_clk,
  output logic                stretched_clk,
  output logic                chopped_clk,
  output logic                edge_clk
);

  logic gated_clk;

  assign gated_clk = clk_in & clk_in_en;

  testable_delay_line #(.SEL_W(DL_SEL_W), .DELAY_TICKS(DELAY_TICKS)) u_delay_line (
    .tick (tick), .rst (rst), .clk_in (gated_clk),
    .mode (dl_mode), .parity (dl_parity), .sel (dl_sel),
    .clk_out (tuned_clk)
  );

  testable_shrinker #(.SEL_W(PS_SEL_W), .DELAY_TICKS(DELAY_TICKS)) u_shrinker (
    .tick (tick), .rst (rst), .clk_in (tuned_clk),
    .sel (shr_sel), .test_sel (shr_test_sel), .clk_out (shrunk_clk)
  );

  testable_stretcher #(.SEL_W(PS_SEL_W), .DELAY_TICKS(DELAY_TICKS)) u_stretcher (
    .tick (tick), .rst (rst), .clk_in (tuned_clk),
    .sel (str_sel), .test_sel (str_test_sel), .clk_out (stretched_clk)
  );

  testable_chopper #(.SEL_W(PS_SEL_W), .DELAY_TICKS(DELAY_TICKS)) u_chopper (
    .tick (tick), .rst (rst), .clk_in (tuned_clk),
    .sel (chp_sel), .test_sel (chp_test_sel), .clk_out (chopped_clk)
  );

  testable_edge_detector #(.DELAY_TICKS(DELAY_TICKS)) u_edge_detector (
    .tick (tick), .rst (rst), .clk_in (tuned_clk),
    .test1 (ed_test1), .test2 (ed_test2), .clk_out (edge_clk)
  );

endmodule

// test_select_decoder - minimized test decoder (DECODER_2) of the testable
// programmable pulse-shaping elements.
//
// It drives the two-input OR gates that degate the chain taps on their way into
// the reconvergent gate. Its terms are those of the select decoder with AND
// replaced by OR: Y_i is the OR of the Test_Sel bits at the positions that X_i
// ANDs. With all Test_Sel bits at 0 every Y_i is 0 and the element works as in
// functional operation; in test, the bits degate (force to the non-controlling
// 1) every tap the test does not want to sensitize.
// For SEL_W = 3: Y0 = t0+t1+t2, Y1 = t0+t1, Y2 = t0+t2, Y3 = t0, Y4 = t1+t2,
// Y5 = t1, Y6 = t2. Purely combinational.
module test_select_decoder
  import clkpc_pkg::*;
#(
  parameter int unsigned SEL_W = 3,
  parameter int unsigned N_SEL = 2 ** SEL_W
) (
  input  logic [SEL_W-1:0] test_sel,  // test_sel[j] is Test_Sel_j
  output logic [N_SEL-2:0] y          // y[i] is Y_i
);

  for (genvar i = 0; i < N_SEL - 1; i++) begin : g_term
    logic [SEL_W-1:0] care;           // Test_Sel bits that take part in Y_i
    for (genvar j = 0; j < SEL_W; j++) begin : g_bit
      assign care[j] = term_has(i, j, SEL_W);
    end
    assign y[i] = |(test_sel & care);
  end

endmodule

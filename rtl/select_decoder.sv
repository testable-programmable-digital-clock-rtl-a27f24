// select_decoder - minimized select decoder (DECODER_1) of the testable
// programmable pulse-shaping elements.
//
// A full decoder would turn SEL_W select bits into 2**SEL_W one-hot lines. When
// it drives the OR-gate delay chain, only the first forced stage matters (every
// later stage is forced by it anyway), so the decoder can be reduced to the
// inverse of a highest-priority encoder: X_i is the AND of the Sel bits that are
// 1 in the code that selects i delay elements, and no Sel bit is ever needed in
// complemented form. With Sel_0 as the most significant bit, code value v
// selects i = N_SEL-1-v delays; X_i = 1 forces chain stage i and so cuts the
// chain after i delays. Code 0 raises no X and keeps the whole chain.
// For SEL_W = 3: X0 = s0.s1.s2, X1 = s0.s1, X2 = s0.s2, X3 = s0, X4 = s1.s2,
// X5 = s1, X6 = s2. Purely combinational.
module select_decoder
  import clkpc_pkg::*;
#(
  parameter int unsigned SEL_W = 3,
  parameter int unsigned N_SEL = 2 ** SEL_W
) (
  input  logic [SEL_W-1:0] sel,     // sel[j] is Sel_j
  output logic [N_SEL-2:0] x        // x[i] is X_i
);

  for (genvar i = 0; i < N_SEL - 1; i++) begin : g_term
    logic [SEL_W-1:0] care;         // Sel bits that take part in X_i
    for (genvar j = 0; j < SEL_W; j++) begin : g_bit
      assign care[j] = term_has(i, j, SEL_W);
    end
    assign x[i] = &(sel | ~care);
  end

endmodule

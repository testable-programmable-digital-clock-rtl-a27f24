// clkpc_pkg - shared types and helper functions for the testable clock pulse
// control elements.
//
// shape_e names the three pulse-shaping variants built from one generic
// element (shrinker, stretcher, chopper). term_has() gives the term structure
// shared by the minimized select decoder (X_i, an AND of Sel bits) and the
// minimized test decoder (Y_i, an OR of Test_Sel bits): with Sel_0 as the most
// significant bit of the select code, code value v selects i = N-1-v delay
// elements, and bit j takes part in term i when bit j of the code N-1-i is 1.
// This order reproduces the eight-selection decode table of the method
// (X0 = sel0.sel1.sel2, X3 = sel0, X6 = sel2, code 000 selects all delays).
package clkpc_pkg;

  typedef enum logic [1:0] {
    SHAPE_SHRINK  = 2'd0,  // AND reconvergence, no inversion
    SHAPE_STRETCH = 2'd1,  // inverted input and output: OR reconvergence
    SHAPE_CHOP    = 2'd2   // inverted delayed leg: inverted reconvergence
  } shape_e;

  // True when Sel_j / Test_Sel_j is an input of decode term i for a
  // sel_w-bit select code. Sel_j is code bit sel_w-1-j (Sel_0 is the MSB).
  function automatic bit term_has(int unsigned i, int unsigned j, int unsigned sel_w);
    int unsigned code;
    code = ((32'd1 << sel_w) - 32'd1) - i;
    return code[sel_w-1-j];
  endfunction

  // Number of delay elements selected by a select code (Sel_j in sel[j]).
  function automatic int unsigned delays_for_code(int unsigned sel, int unsigned sel_w);
    int unsigned v;
    v = 0;
    for (int unsigned j = 0; j < sel_w; j++) v = (v << 1) | ((sel >> j) & 1);
    return ((32'd1 << sel_w) - 32'd1) - v;
  endfunction

endpackage

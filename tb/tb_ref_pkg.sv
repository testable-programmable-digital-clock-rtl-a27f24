// tb_ref_pkg - reference models shared by the testbenches.
//
// The decoder terms are written out term by term from the published decode
// equations (two- and three-bit select codes), not derived from the RTL's
// term rule, so a testbench comparing against them checks that rule. The
// pulse-shaping reference computes the element's output from the history of
// its clock input: h[k] is clk_in as it was k time steps (delays D) earlier.
package tb_ref_pkg;

  typedef enum int {REF_SHRINK, REF_STRETCH, REF_CHOP} ref_shape_e;

  // X_i for a 2- or 3-bit select code; s[j] is Sel_j.
  function automatic logic [6:0] ref_x(int w, logic [2:0] s);
    logic [6:0] x;
    x = '0;
    if (w == 2) begin
      x[0] = s[0] & s[1];
      x[1] = s[0];
      x[2] = s[1];
    end else begin
      x[0] = s[0] & s[1] & s[2];
      x[1] = s[0] & s[1];
      x[2] = s[0] & s[2];
      x[3] = s[0];
      x[4] = s[1] & s[2];
      x[5] = s[1];
      x[6] = s[2];
    end
    return x;
  endfunction

  // Y_i for a 2- or 3-bit test select code; t[j] is Test_Sel_j.
  function automatic logic [6:0] ref_y(int w, logic [2:0] t);
    logic [6:0] y;
    y = '0;
    if (w == 2) begin
      y[0] = t[0] | t[1];
      y[1] = t[0];
      y[2] = t[1];
    end else begin
      y[0] = t[0] | t[1] | t[2];
      y[1] = t[0] | t[1];
      y[2] = t[0] | t[2];
      y[3] = t[0];
      y[4] = t[1] | t[2];
      y[5] = t[1];
      y[6] = t[2];
    end
    return y;
  endfunction

  // Functional number of delays for a select code, from the decode table:
  // Sel_0 is the most significant bit and code value v selects 2**w-1-v.
  function automatic int ref_delays(int w, logic [2:0] s);
    int v;
    v = 0;
    for (int j = 0; j < w; j++) v = v * 2 + int'(s[j]);
    return (1 << w) - 1 - v;
  endfunction

  // Output of a pulse-shaping element with select code s and test code t held
  // steady, given the input history h (h[k] = input k delays ago).
  function automatic logic ref_shaper(ref_shape_e shape, int w, logic [7:0] h,
                                      logic [2:0] s, logic [2:0] t);
    logic [6:0] x, y;
    logic direct, forced, tap, acc;
    int n;
    n = 1 << w;
    x = ref_x(w, s);
    y = ref_y(w, t);
    // Y_0 degates the undelayed clock, Y_k degates tap k, the last tap
    // (k = n-1) is not degated. Tap k is forced to 1 by any X_j, j < k.
    direct = (shape == REF_STRETCH) ? ~h[0] : h[0];
    acc = direct | y[0];
    forced = 1'b0;
    for (int k = 1; k < n; k++) begin
      forced = forced | x[k-1];
      tap = forced ? 1'b1 : ((shape == REF_SHRINK) ? h[k] : ~h[k]);
      acc = acc & ((k < n - 1) ? (tap | y[k]) : tap);
    end
    return (shape == REF_STRETCH) ? ~acc : acc;
  endfunction

endpackage

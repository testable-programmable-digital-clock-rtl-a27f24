// tb_select_decoder - exhaustive check of the minimized select decoder at
// two and three select bits against the decode equations written out term by
// term, and of the decoder's defining property: the lowest raised X_i is the
// one for the number of delays the code selects, and code 0 raises none.
// A six-bit instance (64 selections) is also checked for the published term
// count: one AND of 6 inputs, 6 of 5, 15 of 4, 20 of 3, 15 of 2 and 6 single
// inputs, found by probing each X_i with every code, and for its priority
// property over all 64 codes.
module tb_select_decoder;
  import tb_ref_pkg::*;

  logic [1:0] sel2;
  logic [2:0] sel3;
  logic [2:0] x2;
  logic [6:0] x3;
  logic [5:0] sel6;
  logic [62:0] x6;
  int checks = 0;
  int failures = 0;

  select_decoder #(.SEL_W(2)) u_dut2 (.sel(sel2), .x(x2));
  select_decoder u_dut3 (.sel(sel3), .x(x3));
  select_decoder #(.SEL_W(6)) u_dut6 (.sel(sel6), .x(x6));

  function automatic int lowest(logic [6:0] v, int n);
    for (int i = 0; i < n; i++) if (v[i]) return i;
    return n;
  endfunction

  initial begin
    for (int c = 0; c < 8; c++) begin
      sel3 = 3'(c);
      sel2 = 2'(c);
      #1;
      checks++;
      if (x3 !== ref_x(3, sel3)) begin
        failures++; $display("w=3 sel=%b x=%b exp %b", sel3, x3, ref_x(3, sel3));
      end
      checks++;
      if (lowest(x3, 7) != ref_delays(3, sel3)) begin
        failures++; $display("w=3 sel=%b lowest X %0d", sel3, lowest(x3, 7));
      end
      if (c < 4) begin
        checks++;
        if (x2 !== ref_x(2, {1'b0, sel2}) [2:0]) begin
          failures++; $display("w=2 sel=%b x=%b", sel2, x2);
        end
        checks++;
        if (lowest({4'b0, x2}, 3) != ref_delays(2, {1'b0, sel2})) begin
          failures++; $display("w=2 sel=%b lowest wrong", sel2);
        end
      end
    end
    begin
      int min_in [63];     // fewest Sel bits at 1 that raise X_i
      int size_count [7];  // number of terms with a given input count
      foreach (min_in[i]) min_in[i] = 99;
      foreach (size_count[k]) size_count[k] = 0;
      for (int c = 0; c < 64; c++) begin
        int i_sel, v, low;
        sel6 = 6'(c);
        #1;
        for (int i = 0; i < 63; i++)
          if (x6[i] && $countones(sel6) < min_in[i]) min_in[i] = $countones(sel6);
        v = 0;
        for (int j = 0; j < 6; j++) v = v * 2 + int'(sel6[j]);
        i_sel = 63 - v;
        low = 63;
        for (int i = 62; i >= 0; i--) if (x6[i]) low = i;
        checks++;
        if (low != i_sel) begin
          failures++; $display("w=6 sel=%b lowest X %0d exp %0d", sel6, low, i_sel);
        end
      end
      foreach (min_in[i]) if (min_in[i] <= 6) size_count[min_in[i]]++;
      checks++;
      if (size_count[6] != 1 || size_count[5] != 6 || size_count[4] != 15 ||
          size_count[3] != 20 || size_count[2] != 15 || size_count[1] != 6) begin
        failures++;
        $display("w=6 term sizes 6:%0d 5:%0d 4:%0d 3:%0d 2:%0d 1:%0d", size_count[6],
                 size_count[5], size_count[4], size_count[3], size_count[2], size_count[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_testable_stretcher - checks the testable programmable stretcher at its default
// size (two select bits, four selections).
//  1. Every Sel / Test_Sel pair with random clock levels: the output is
//     compared each time step with a reference built from the input history
//     and the published decode equations (X0 = S0.S1, X1 = S0, X2 = S1;
//     Y0 = T0+T1, Y1 = T0, Y2 = T1).
//  2. Functional timing (Test_Sel = 0), i delays selected by Sel:
//     a positive pulse of width W = 6 D comes out W+iD wide with its leading
//     edge on time; a negative pulse comes out W-iD wide.
//     Sel0 Sel1 = 11, 10, 01, 00 must select i = 0, 1, 2, 3.
module tb_testable_stretcher;
  import tb_ref_pkg::*;

  localparam int PULSE = 6;

  logic       tick = 1'b0;
  logic       rst;
  logic       clk_in;
  logic [1:0] sel, test_sel;
  logic       out;
  logic [7:0] hist;
  int         checks = 0;
  int         failures = 0;

  always #5 tick = ~tick;

  testable_stretcher u_dut (
    .tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel), .test_sel(test_sel), .clk_out(out));

  task automatic step(input logic v, input bit check);
    clk_in = v;
    hist = {hist[6:0], v};
    #1;
    if (check) begin
      logic e;
      e = ref_shaper(REF_STRETCH, 2, hist, {1'b0, sel}, {1'b0, test_sel});
      checks++;
      if (out !== e) begin
        failures++;
        $display("sel=%b tsel=%b hist=%b out=%b exp=%b", sel, test_sel, hist, out, e);
      end
    end
    @(posedge tick); #1;
  endtask

  // Response to one pulse of width PULSE and polarity pol on a steady ~pol.
  // Returns the first step at which the output equals pol and how many steps
  // it does.
  task automatic pulse(input logic pol, output int first_at, output int width);
    logic [39:0] rec;
    first_at = -1; width = 0;
    for (int n = 0; n < 10; n++) step(~pol, 1'b0);
    for (int n = 0; n < 40; n++) begin
      clk_in = (n < PULSE) ? pol : ~pol;
      #1;
      rec[n] = out;
      step(clk_in, 1'b0);
    end
    for (int n = 0; n < 40; n++) begin
      if (rec[n] == pol && first_at < 0) first_at = n;
      if (rec[n] == pol) width++;
    end
  endtask

  initial begin
    int r, wd, nr, nwd, i;
    rst = 1'b1; clk_in = 1'b0; sel = '0; test_sel = '0; hist = '0;
    repeat (3) @(posedge tick);
    #1 rst = 1'b0;

    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        sel = 2'(a); test_sel = 2'(b);
        for (int n = 0; n < 6; n++)  step(1'($urandom), 1'b0);
        for (int n = 0; n < 32; n++) step(1'($urandom), 1'b1);
      end
    end

    test_sel = '0;
    for (int a = 0; a < 4; a++) begin
      sel = 2'(a);
      i = 3 - (2 * int'(sel[0]) + int'(sel[1]));   // Sel0 is the high bit
      pulse(1'b1, r, wd);
      pulse(1'b0, nr, nwd);
      checks++;
      if (!(r == 0 && wd == PULSE + i)) begin
        failures++; $display("positive pulse, i=%0d: first %0d width %0d", i, r, wd);
      end
      checks++;
      if (!(nwd == PULSE - i)) begin
        failures++; $display("negative pulse, i=%0d: first %0d width %0d", i, nr, nwd);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge tick);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

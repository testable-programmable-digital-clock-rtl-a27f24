// tb_pulse_shaper - checks the generic testable pulse-shaping element at three
// select bits (eight selections, the size of the published decode example)
// in all three shapes, plus one instance at its default parameters.
//  1. Static and random patterns: for every Sel and Test_Sel pair the output
//     is compared, each time step, with a reference computed from the input
//     history and the published X/Y decode equations.
//  2. Pulse timing in functional operation (Test_Sel = 0): a positive pulse
//     of width W = 10 D must come out shrunk by iD (leading edge iD late),
//     stretched by iD, or chopped to width D (unchopped for i = 0), where i is
//     the number of delays the Sel code selects.
module tb_pulse_shaper;
  import tb_ref_pkg::*;
  import clkpc_pkg::*;

  localparam int W      = 3;
  localparam int PULSE  = 10;

  logic       tick = 1'b0;
  logic       rst;
  logic       clk_in;
  logic [2:0] sel, test_sel;
  logic [2:0] out;            // 0 shrink, 1 stretch, 2 chop
  logic       out_dflt;
  logic [7:0] hist;           // hist[k] = clk_in k steps ago
  int         checks = 0;
  int         failures = 0;

  always #5 tick = ~tick;

  pulse_shaper #(.SEL_W(W), .SHAPE(SHAPE_SHRINK)) u_shrink (
    .tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel), .test_sel(test_sel), .clk_out(out[0]));
  pulse_shaper #(.SEL_W(W), .SHAPE(SHAPE_STRETCH)) u_stretch (
    .tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel), .test_sel(test_sel), .clk_out(out[1]));
  pulse_shaper #(.SEL_W(W), .SHAPE(SHAPE_CHOP)) u_chop (
    .tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel), .test_sel(test_sel), .clk_out(out[2]));
  pulse_shaper u_dflt (
    .tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel[1:0]), .test_sel(test_sel[1:0]),
    .clk_out(out_dflt));

  // Drive clk_in for one step, check against the reference if asked, advance.
  task automatic step(input logic v, input bit check);
    clk_in = v;
    hist = {hist[6:0], v};
    #1;
    if (check) begin
      for (int s = 0; s < 3; s++) begin
        logic e;
        e = ref_shaper(ref_shape_e'(s), W, hist, sel, test_sel);
        checks++;
        if (out[s] !== e) begin
          failures++;
          $display("shape %0d sel=%b tsel=%b hist=%b out=%b exp=%b", s, sel, test_sel, hist, out[s], e);
        end
      end
      checks++;
      if (out_dflt !== ref_shaper(REF_SHRINK, 2, hist, {1'b0, sel[1:0]}, {1'b0, test_sel[1:0]})) begin
        failures++;
        $display("default instance sel=%b tsel=%b hist=%b", sel[1:0], test_sel[1:0], hist);
      end
    end
    @(posedge tick); #1;
  endtask

  // Measure the response of shape s to one positive pulse of width PULSE.
  task automatic pulse(input int s, output int rise_at, output int width);
    logic [63:0] rec;
    rise_at = -1; width = 0;
    for (int n = 0; n < 16; n++) step(1'b0, 1'b0);
    for (int n = 0; n < 40; n++) begin
      clk_in = (n < PULSE);
      #1;
      rec[n] = out[s];
      step(clk_in, 1'b0);
    end
    for (int n = 0; n < 40; n++) begin
      if (rec[n] && rise_at < 0) rise_at = n;
      if (rec[n]) width++;
    end
  endtask

  initial begin
    rst = 1'b1; clk_in = 1'b0; sel = '0; test_sel = '0; hist = '0;
    repeat (3) @(posedge tick);
    #1 rst = 1'b0;

    // 1. every Sel / Test_Sel pair, random clock levels
    for (int a = 0; a < 8; a++) begin
      for (int b = 0; b < 8; b++) begin
        sel = 3'(a); test_sel = 3'(b);
        for (int n = 0; n < 8; n++)  step(1'($urandom), 1'b0);   // settle
        for (int n = 0; n < 24; n++) step(1'($urandom), 1'b1);
      end
    end

    // 2. functional pulse timing
    test_sel = '0;
    for (int a = 0; a < 8; a++) begin
      int i, r, wd;
      sel = 3'(a);
      i = ref_delays(W, sel);
      pulse(0, r, wd);
      checks++;
      if (r != i || wd != PULSE - i) begin
        failures++; $display("shrink i=%0d rise %0d width %0d", i, r, wd);
      end
      pulse(1, r, wd);
      checks++;
      if (r != 0 || wd != PULSE + i) begin
        failures++; $display("stretch i=%0d rise %0d width %0d", i, r, wd);
      end
      pulse(2, r, wd);
      checks++;
      if (r != 0 || wd != ((i == 0) ? PULSE : 1)) begin
        failures++; $display("chop i=%0d rise %0d width %0d", i, r, wd);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge tick);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_testable_delay_line - checks the testable programmable delay line at its
// default size (two select bits, four taps).
//  1. Functional mode (Mode = 0), any Parity: the output is the input delayed
//     by (sel+1) D, step by step, for random input levels.
//  2. Test mode (Mode = 1): with {sel, Parity} of even parity the selected
//     path passes as in functional mode; with odd parity (what a single stuck
//     select bit produces) no path is selected and the output stays at 1.
//  3. Pulse timing: a pulse of width 6 D leaves (sel+1) D late with its width
//     kept, for every selection.
module tb_testable_delay_line;

  logic       tick = 1'b0;
  logic       rst;
  logic       clk_in;
  logic       mode, parity;
  logic [1:0] sel;
  logic       out;
  logic [7:0] hist;
  int         checks = 0;
  int         failures = 0;

  always #5 tick = ~tick;

  testable_delay_line u_dut (
    .tick(tick), .rst(rst), .clk_in(clk_in), .mode(mode), .parity(parity),
    .sel(sel), .clk_out(out));

  task automatic step(input logic v, input bit check, input logic expect_path);
    clk_in = v;
    hist = {hist[6:0], v};
    #1;
    if (check) begin
      logic e;
      e = expect_path ? hist[int'(sel) + 1] : 1'b1;
      checks++;
      if (out !== e) begin
        failures++;
        $display("mode=%b par=%b sel=%0d hist=%b out=%b exp=%b", mode, parity, sel, hist, out, e);
      end
    end
    @(posedge tick); #1;
  endtask

  initial begin
    rst = 1'b1; clk_in = 1'b0; mode = 1'b0; parity = 1'b0; sel = '0; hist = '0;
    repeat (3) @(posedge tick);
    #1 rst = 1'b0;

    for (int m = 0; m < 2; m++) begin
      for (int a = 0; a < 4; a++) begin
        for (int p = 0; p < 2; p++) begin
          logic path;
          mode = 1'(m); sel = 2'(a); parity = 1'(p);
          path = (m == 0) || !(^{sel, parity});
          for (int n = 0; n < 6; n++)  step(1'($urandom), 1'b0, path);
          for (int n = 0; n < 32; n++) step(1'($urandom), 1'b1, path);
        end
      end
    end

    mode = 1'b0;
    for (int a = 0; a < 4; a++) begin
      int first_at, width;
      logic [39:0] rec;
      sel = 2'(a);
      for (int n = 0; n < 8; n++) step(1'b0, 1'b0, 1'b1);
      for (int n = 0; n < 40; n++) begin
        clk_in = (n < 6);
        #1 rec[n] = out;
        step(clk_in, 1'b0, 1'b1);
      end
      first_at = -1; width = 0;
      for (int n = 0; n < 40; n++) begin
        if (rec[n] && first_at < 0) first_at = n;
        if (rec[n]) width++;
      end
      checks++;
      if (first_at != a + 1 || width != 6) begin
        failures++; $display("sel=%0d pulse at %0d width %0d", a, first_at, width);
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

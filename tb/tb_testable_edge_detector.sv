// tb_testable_edge_detector - checks the testable edge detector.
//  1. All four settings of test1/test2 with random clock levels: the output
//     must be (test1 & clk) ^ (test2 & clk delayed by D), step by step. The
//     three test settings are what let a static test put all four patterns on
//     the XOR inputs.
//  2. Functional timing (test1 = test2 = 1): a pulse of width 5 D gives two
//     output pulses of width D, one at each input edge.
module tb_testable_edge_detector;

  logic       tick = 1'b0;
  logic       rst;
  logic       clk_in, test1, test2;
  logic       out;
  logic       prev;
  int         checks = 0;
  int         failures = 0;
  bit [3:0]   seen;      // XOR input patterns reached, {undelayed, delayed}

  always #5 tick = ~tick;

  testable_edge_detector u_dut (
    .tick(tick), .rst(rst), .clk_in(clk_in), .test1(test1), .test2(test2), .clk_out(out));

  initial begin
    rst = 1'b1; clk_in = 1'b0; test1 = 1'b1; test2 = 1'b1; prev = 1'b0; seen = '0;
    repeat (3) @(posedge tick);
    #1 rst = 1'b0;

    for (int t = 0; t < 4; t++) begin
      {test1, test2} = 2'(t);
      for (int n = 0; n < 40; n++) begin
        logic e;
        clk_in = 1'($urandom);
        #1;
        e = (test1 & clk_in) ^ (test2 & prev);
        seen[{test1 & clk_in, test2 & prev}] = 1'b1;
        if (n > 0) begin
          checks++;
          if (out !== e) begin
            failures++; $display("t1=%b t2=%b clk=%b prev=%b out=%b", test1, test2, clk_in, prev, out);
          end
        end
        @(posedge tick); #1;
        prev = clk_in;
      end
    end
    checks++;
    if (seen != 4'hf) begin failures++; $display("XOR patterns reached %b", seen); end

    begin
      logic [29:0] rec;
      test1 = 1'b1; test2 = 1'b1;
      clk_in = 1'b0;
      repeat (3) @(posedge tick);
      #1;
      for (int n = 0; n < 30; n++) begin
        clk_in = (n >= 2 && n < 7);
        #1 rec[n] = out;
        @(posedge tick); #1;
      end
      checks++;
      if (rec !== 30'b00_0000_0000_0000_0000_0000_1000_0100) begin
        failures++; $display("edge pulses %b", rec);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge tick);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

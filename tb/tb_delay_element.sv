// tb_delay_element - checks that the delay element reproduces its input
// exactly DELAY_TICKS tick periods later, for random input sequences and for
// two delay lengths (1, the default, and 3), and that reset clears it.
module tb_delay_element;

  logic tick = 1'b0;
  logic rst;
  logic d;
  logic q1, q3;
  int   checks = 0;
  int   failures = 0;
  logic [15:0] hist;   // hist[k] = d as driven k ticks ago

  always #5 tick = ~tick;

  delay_element u_dut1 (.tick(tick), .rst(rst), .d(d), .q(q1));
  delay_element #(.DELAY_TICKS(3)) u_dut3 (.tick(tick), .rst(rst), .d(d), .q(q3));

  initial begin
    repeat (2000) @(posedge tick);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = 1'b1; hist = '0;
    repeat (4) @(posedge tick);
    #1;
    checks++; if (q1 !== 1'b0 || q3 !== 1'b0) begin failures++; $display("reset not cleared"); end
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      d = 1'($urandom);
      #1;
      if (n >= 3) begin
        checks++;
        if (q1 !== hist[0] || q3 !== hist[2]) begin
          failures++;
          $display("n=%0d q1=%b exp %b q3=%b exp %b", n, q1, hist[0], q3, hist[2]);
        end
      end
      @(posedge tick); #1;
      hist = {hist[14:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

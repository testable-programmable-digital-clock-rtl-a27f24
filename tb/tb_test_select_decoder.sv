// tb_test_select_decoder - exhaustive check of the minimized test decoder at
// two and three test select bits against the published Y equations written
// out term by term, and of its functional property: Test_Sel = 0 raises no
// Y_i, and every Y_i is raised by at least one single Test_Sel bit.
module tb_test_select_decoder;
  import tb_ref_pkg::*;

  logic [1:0] ts2;
  logic [2:0] ts3;
  logic [2:0] y2;
  logic [6:0] y3;
  int checks = 0;
  int failures = 0;

  test_select_decoder #(.SEL_W(2)) u_dut2 (.test_sel(ts2), .y(y2));
  test_select_decoder u_dut3 (.test_sel(ts3), .y(y3));

  initial begin
    for (int c = 0; c < 8; c++) begin
      ts3 = 3'(c);
      ts2 = 2'(c);
      #1;
      checks++;
      if (y3 !== ref_y(3, ts3)) begin
        failures++; $display("w=3 test_sel=%b y=%b exp %b", ts3, y3, ref_y(3, ts3));
      end
      checks++;
      if ((c == 0) && (y3 != '0)) begin
        failures++; $display("w=3 Test_Sel=0 raises Y");
      end
      if (c < 4) begin
        checks++;
        if (y2 !== ref_y(2, {1'b0, ts2}) [2:0]) begin
          failures++; $display("w=2 test_sel=%b y=%b", ts2, y2);
        end
        checks++;
        if ((c == 0) && (y2 != '0)) begin
          failures++; $display("w=2 Test_Sel=0 raises Y");
        end
      end
    end
    // Every term is reachable from single bits: OR of the one-hot results.
    begin
      logic [6:0] any3;
      any3 = '0;
      for (int j = 0; j < 3; j++) begin ts3 = 3'(1 << j); #1; any3 |= y3; end
      checks++;
      if (any3 !== 7'h7f) begin failures++; $display("unreachable Y term %b", any3); end
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

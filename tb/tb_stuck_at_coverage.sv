// tb_stuck_at_coverage - single stuck-at fault coverage of the testable
// elements under static (DC) patterns.
//
// The point of the test inputs is that every single stuck-at fault of an
// element becomes visible to static patterns. This testbench checks that
// claim by fault simulation. Each line of an element (every gate output, and
// every gate input that is a branch of its own) is in turn forced to 0 and to
// 1. A static pattern is applied and held for ten delays, and the output is
// then compared with the fault-free response to the same pattern. A fault is
// detected when some pattern gives a different output. Faults on an element's
// inputs are forced on the testbench signal that drives them; only the output
// of the element under test is compared, so the other elements do not matter.
//
// Two pattern sets are used per element:
//   full       : every combination of the clock level, the selection inputs
//                and the added test inputs;
//   functional : the test inputs held at their functional values, so only the
//                clock level and the selection inputs vary. This is what a
//                static test of an element without the test logic could do.
// Expected: the full set detects every fault of every element (a failure
// per undetected fault), and the functional set leaves some faults
// undetected (a failure if it does not), which shows the redundancy that
// the test inputs remove.
//
// Elements: the four-selection shrinker, stretcher and chopper (21 lines each),
// the four-tap delay line (31 lines), the edge detector (7 lines) and an
// eight-selection shrinker (39 lines, the size of the published decode
// example), which shows that the method holds beyond four selections.
module tb_stuck_at_coverage;

  `define FAULT_SITE(path) begin if (!en) release path; else if (val) force path = 1'b1; else force path = 1'b0; end

  logic       tick = 1'b0;
  logic       rst;
  logic       clk_in;
  logic [1:0] sel, test_sel;
  logic       mode, parity, test1, test2;
  logic [2:0] sel8, test_sel8;
  logic [5:0] out;    // shrinker, stretcher, chopper, delay line, edge detector,
                      // eight-selection shrinker
  int         checks = 0;
  int         failures = 0;

  always #5 tick = ~tick;

  testable_shrinker u_shr (.tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel),
                           .test_sel(test_sel), .clk_out(out[0]));
  testable_stretcher u_str (.tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel),
                            .test_sel(test_sel), .clk_out(out[1]));
  testable_chopper u_chp (.tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel),
                          .test_sel(test_sel), .clk_out(out[2]));
  testable_delay_line u_dl (.tick(tick), .rst(rst), .clk_in(clk_in), .mode(mode),
                            .parity(parity), .sel(sel), .clk_out(out[3]));
  testable_edge_detector u_ed (.tick(tick), .rst(rst), .clk_in(clk_in), .test1(test1),
                               .test2(test2), .clk_out(out[4]));

  pulse_shaper #(.SEL_W(3)) u_ps8 (.tick(tick), .rst(rst), .clk_in(clk_in), .sel(sel8),
                                   .test_sel(test_sel8), .clk_out(out[5]));

  localparam int N_PS8_SITES    = 39;
  localparam int N_SHAPER_SITES = 21;
  localparam int N_DL_SITES     = 31;
  localparam int N_ED_SITES     = 7;

  function automatic int n_sites(int e);
    return (e < 3) ? N_SHAPER_SITES : (e == 3) ? N_DL_SITES : (e == 4) ? N_ED_SITES : N_PS8_SITES;
  endfunction

  // Number of static patterns of element e, and whether pattern p belongs to
  // the functional set.
  function automatic int n_patterns(int e);
    return (e < 3) ? 32 : (e == 3) ? 32 : (e == 4) ? 8 : 128;
  endfunction

  function automatic bit functional_pattern(int e, int p);
    if (e < 3)  return p[4:3] == 2'b00;            // test_sel = 0
    if (e == 3) return p[4:3] == 2'b00;            // mode = 0, parity = 0
    if (e == 4) return p[2:1] == 2'b11;            // test1 = test2 = 1
    return p[6:4] == 3'b000;                       // test_sel = 0
  endfunction

  task automatic apply_pattern(int e, int p);
    clk_in = p[0];
    if (e < 3) begin
      sel = p[2:1]; test_sel = p[4:3];
    end else if (e == 3) begin
      sel = p[2:1]; parity = p[3]; mode = p[4];
    end else if (e == 4) begin
      test1 = p[2]; test2 = p[1];
    end else begin
      sel8 = p[3:1]; test_sel8 = p[6:4];
    end
    repeat (10) @(posedge tick);
    #1;
  endtask

  task automatic set_fault(int e, int site, bit en, bit val);
    case (e)
      0: case (site)
        0: `FAULT_SITE(clk_in)
        1: `FAULT_SITE(sel[0])
        2: `FAULT_SITE(sel[1])
        3: `FAULT_SITE(test_sel[0])
        4: `FAULT_SITE(test_sel[1])
        5: `FAULT_SITE(u_shr.u_shaper.direct)
        6: `FAULT_SITE(u_shr.u_shaper.chain[0])
        7: `FAULT_SITE(u_shr.u_shaper.chain[1])
        8: `FAULT_SITE(u_shr.u_shaper.chain[2])
        9: `FAULT_SITE(u_shr.u_shaper.chain[3])
        10: `FAULT_SITE(u_shr.u_shaper.x[0])
        11: `FAULT_SITE(u_shr.u_shaper.x[1])
        12: `FAULT_SITE(u_shr.u_shaper.x[2])
        13: `FAULT_SITE(u_shr.u_shaper.y[0])
        14: `FAULT_SITE(u_shr.u_shaper.y[1])
        15: `FAULT_SITE(u_shr.u_shaper.y[2])
        16: `FAULT_SITE(u_shr.u_shaper.gated[0])
        17: `FAULT_SITE(u_shr.u_shaper.gated[1])
        18: `FAULT_SITE(u_shr.u_shaper.gated[2])
        19: `FAULT_SITE(u_shr.u_shaper.reconv)
        20: `FAULT_SITE(u_shr.u_shaper.clk_out)
        default: ;
      endcase
      1: case (site)
        0: `FAULT_SITE(clk_in)
        1: `FAULT_SITE(sel[0])
        2: `FAULT_SITE(sel[1])
        3: `FAULT_SITE(test_sel[0])
        4: `FAULT_SITE(test_sel[1])
        5: `FAULT_SITE(u_str.u_shaper.direct)
        6: `FAULT_SITE(u_str.u_shaper.chain[0])
        7: `FAULT_SITE(u_str.u_shaper.chain[1])
        8: `FAULT_SITE(u_str.u_shaper.chain[2])
        9: `FAULT_SITE(u_str.u_shaper.chain[3])
        10: `FAULT_SITE(u_str.u_shaper.x[0])
        11: `FAULT_SITE(u_str.u_shaper.x[1])
        12: `FAULT_SITE(u_str.u_shaper.x[2])
        13: `FAULT_SITE(u_str.u_shaper.y[0])
        14: `FAULT_SITE(u_str.u_shaper.y[1])
        15: `FAULT_SITE(u_str.u_shaper.y[2])
        16: `FAULT_SITE(u_str.u_shaper.gated[0])
        17: `FAULT_SITE(u_str.u_shaper.gated[1])
        18: `FAULT_SITE(u_str.u_shaper.gated[2])
        19: `FAULT_SITE(u_str.u_shaper.reconv)
        20: `FAULT_SITE(u_str.u_shaper.clk_out)
        default: ;
      endcase
      2: case (site)
        0: `FAULT_SITE(clk_in)
        1: `FAULT_SITE(sel[0])
        2: `FAULT_SITE(sel[1])
        3: `FAULT_SITE(test_sel[0])
        4: `FAULT_SITE(test_sel[1])
        5: `FAULT_SITE(u_chp.u_shaper.direct)
        6: `FAULT_SITE(u_chp.u_shaper.chain[0])
        7: `FAULT_SITE(u_chp.u_shaper.chain[1])
        8: `FAULT_SITE(u_chp.u_shaper.chain[2])
        9: `FAULT_SITE(u_chp.u_shaper.chain[3])
        10: `FAULT_SITE(u_chp.u_shaper.x[0])
        11: `FAULT_SITE(u_chp.u_shaper.x[1])
        12: `FAULT_SITE(u_chp.u_shaper.x[2])
        13: `FAULT_SITE(u_chp.u_shaper.y[0])
        14: `FAULT_SITE(u_chp.u_shaper.y[1])
        15: `FAULT_SITE(u_chp.u_shaper.y[2])
        16: `FAULT_SITE(u_chp.u_shaper.gated[0])
        17: `FAULT_SITE(u_chp.u_shaper.gated[1])
        18: `FAULT_SITE(u_chp.u_shaper.gated[2])
        19: `FAULT_SITE(u_chp.u_shaper.reconv)
        20: `FAULT_SITE(u_chp.u_shaper.clk_out)
        default: ;
      endcase
      3: case (site)
        0: `FAULT_SITE(clk_in)
        1: `FAULT_SITE(mode)
        2: `FAULT_SITE(parity)
        3: `FAULT_SITE(sel[0])
        4: `FAULT_SITE(sel[1])
        5: `FAULT_SITE(u_dl.sel_n[0])
        6: `FAULT_SITE(u_dl.sel_n[1])
        7: `FAULT_SITE(u_dl.pt)
        8: `FAULT_SITE(u_dl.pt_n)
        9: `FAULT_SITE(u_dl.pc)
        10: `FAULT_SITE(u_dl.tap[0])
        11: `FAULT_SITE(u_dl.tap[1])
        12: `FAULT_SITE(u_dl.tap[2])
        13: `FAULT_SITE(u_dl.tap[3])
        14: `FAULT_SITE(u_dl.g_tap[0].lit[0])
        15: `FAULT_SITE(u_dl.g_tap[0].lit[1])
        16: `FAULT_SITE(u_dl.g_tap[1].lit[0])
        17: `FAULT_SITE(u_dl.g_tap[1].lit[1])
        18: `FAULT_SITE(u_dl.g_tap[2].lit[0])
        19: `FAULT_SITE(u_dl.g_tap[2].lit[1])
        20: `FAULT_SITE(u_dl.g_tap[3].lit[0])
        21: `FAULT_SITE(u_dl.g_tap[3].lit[1])
        22: `FAULT_SITE(u_dl.g_tap[0].plit)
        23: `FAULT_SITE(u_dl.g_tap[1].plit)
        24: `FAULT_SITE(u_dl.g_tap[2].plit)
        25: `FAULT_SITE(u_dl.g_tap[3].plit)
        26: `FAULT_SITE(u_dl.gate_out[0])
        27: `FAULT_SITE(u_dl.gate_out[1])
        28: `FAULT_SITE(u_dl.gate_out[2])
        29: `FAULT_SITE(u_dl.gate_out[3])
        30: `FAULT_SITE(u_dl.clk_out)
        default: ;
      endcase
      4: case (site)
        0: `FAULT_SITE(clk_in)
        1: `FAULT_SITE(test1)
        2: `FAULT_SITE(test2)
        3: `FAULT_SITE(u_ed.delayed)
        4: `FAULT_SITE(u_ed.leg_now)
        5: `FAULT_SITE(u_ed.leg_late)
        6: `FAULT_SITE(u_ed.clk_out)
        default: ;
      endcase
      default: case (site)
        0: `FAULT_SITE(clk_in)
        1: `FAULT_SITE(sel8[0])
        2: `FAULT_SITE(sel8[1])
        3: `FAULT_SITE(sel8[2])
        4: `FAULT_SITE(test_sel8[0])
        5: `FAULT_SITE(test_sel8[1])
        6: `FAULT_SITE(test_sel8[2])
        7: `FAULT_SITE(u_ps8.direct)
        8: `FAULT_SITE(u_ps8.chain[0])
        9: `FAULT_SITE(u_ps8.chain[1])
        10: `FAULT_SITE(u_ps8.chain[2])
        11: `FAULT_SITE(u_ps8.chain[3])
        12: `FAULT_SITE(u_ps8.chain[4])
        13: `FAULT_SITE(u_ps8.chain[5])
        14: `FAULT_SITE(u_ps8.chain[6])
        15: `FAULT_SITE(u_ps8.chain[7])
        16: `FAULT_SITE(u_ps8.x[0])
        17: `FAULT_SITE(u_ps8.x[1])
        18: `FAULT_SITE(u_ps8.x[2])
        19: `FAULT_SITE(u_ps8.x[3])
        20: `FAULT_SITE(u_ps8.x[4])
        21: `FAULT_SITE(u_ps8.x[5])
        22: `FAULT_SITE(u_ps8.x[6])
        23: `FAULT_SITE(u_ps8.y[0])
        24: `FAULT_SITE(u_ps8.y[1])
        25: `FAULT_SITE(u_ps8.y[2])
        26: `FAULT_SITE(u_ps8.y[3])
        27: `FAULT_SITE(u_ps8.y[4])
        28: `FAULT_SITE(u_ps8.y[5])
        29: `FAULT_SITE(u_ps8.y[6])
        30: `FAULT_SITE(u_ps8.gated[0])
        31: `FAULT_SITE(u_ps8.gated[1])
        32: `FAULT_SITE(u_ps8.gated[2])
        33: `FAULT_SITE(u_ps8.gated[3])
        34: `FAULT_SITE(u_ps8.gated[4])
        35: `FAULT_SITE(u_ps8.gated[5])
        36: `FAULT_SITE(u_ps8.gated[6])
        37: `FAULT_SITE(u_ps8.reconv)
        38: `FAULT_SITE(u_ps8.clk_out)
        default: ;
      endcase
    endcase
  endtask

  initial begin
    string names [6];
    names = '{"shrinker", "stretcher", "chopper", "delay line", "edge detector",
              "eight-selection shrinker"};
    rst = 1'b1; clk_in = 1'b0; sel = '0; test_sel = '0; mode = 1'b0; parity = 1'b0;
    sel8 = '0; test_sel8 = '0;
    test1 = 1'b1; test2 = 1'b1;
    repeat (3) @(posedge tick);
    #1 rst = 1'b0;
    // The delay line's assertions describe the fault-free circuit; injected
    // faults break them on purpose.
    $assertoff(0, u_dl);

    for (int e = 0; e < 6; e++) begin
      logic [127:0] good;
      int faults, det_full, det_func;
      faults = 0; det_full = 0; det_func = 0;
      for (int p = 0; p < n_patterns(e); p++) begin
        apply_pattern(e, p);
        good[p] = out[e];
      end
      for (int site = 0; site < n_sites(e); site++) begin
        for (int v = 0; v < 2; v++) begin
          bit hit_full, hit_func;
          hit_full = 1'b0; hit_func = 1'b0;
          set_fault(e, site, 1'b1, 1'(v));
          for (int p = 0; p < n_patterns(e); p++) begin
            apply_pattern(e, p);
            if (out[e] !== good[p]) begin
              hit_full = 1'b1;
              if (functional_pattern(e, p)) hit_func = 1'b1;
            end
          end
          set_fault(e, site, 1'b0, 1'b0);
          faults++;
          det_full += int'(hit_full);
          det_func += int'(hit_func);
          checks++;
          if (!hit_full) begin
            failures++;
            $display("%s: site %0d stuck-at-%0d not detected", names[e], site, v);
          end
        end
      end
      $display("%s: %0d faults, %0d detected with test inputs, %0d with functional patterns only",
               names[e], faults, det_full, det_func);
      checks++;
      if (det_func == faults) begin
        failures++;
        $display("%s: functional patterns alone already detect every fault", names[e]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge tick);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `undef FAULT_SITE

endmodule

// tb_tclk_top - end-to-end test of the testable clock path at its default
// parameters (no parameter overrides).
//
// The test runs segments of 40 time steps. Each segment picks a random
// configuration - functional (all test inputs at their functional values) half
// of the time, otherwise random Mode/Parity, Test_Sel and test1/test2 levels
// and a random clock enable - and drives clock pulses of random width 4..9 D
// (wider than the 3 D the shapers need) with random gaps. From the history of
// the gated clock a reference computes the expected tuned clock (delayed by
// (sel+1) D when a path is selected, 1 when bad parity selects none) and then,
// from the tuned history, each shaper output and the edge detector output;
// every output is compared each step once the segment has settled.
//
// Each mechanism must occur at least once or a failure is counted: every delay
// selection passing a pulse, a bad-parity pattern blocking all paths in test
// mode, the input AND gate holding the clock, a pulse being shrunk,
// stretched and chopped, an edge detected, and a Test_Sel degating a tap.
module tb_tclk_top;
  import tb_ref_pkg::*;

  logic       tick = 1'b0;
  logic       rst;
  logic       clk_in, clk_in_en, dl_mode, dl_parity;
  logic [1:0] dl_sel, shr_sel, shr_test_sel, str_sel, str_test_sel, chp_sel, chp_test_sel;
  logic       ed_test1, ed_test2;
  logic       tuned_clk, shrunk_clk, stretched_clk, chopped_clk, edge_clk;

  logic [15:0] g_hist;        // gated clock, g_hist[k] = k steps ago
  logic [7:0]  t_hist;        // expected tuned clock history
  int          checks = 0;
  int          failures = 0;

  int n_delay_sel [4];
  int n_parity_block, n_input_gate, n_shrink, n_stretch, n_chop, n_edge, n_degate;

  always #5 tick = ~tick;

  tclk_top u_dut (
    .tick(tick), .rst(rst), .clk_in(clk_in), .clk_in_en(clk_in_en),
    .dl_mode(dl_mode), .dl_parity(dl_parity), .dl_sel(dl_sel),
    .shr_sel(shr_sel), .shr_test_sel(shr_test_sel),
    .str_sel(str_sel), .str_test_sel(str_test_sel),
    .chp_sel(chp_sel), .chp_test_sel(chp_test_sel),
    .ed_test1(ed_test1), .ed_test2(ed_test2),
    .tuned_clk(tuned_clk), .shrunk_clk(shrunk_clk), .stretched_clk(stretched_clk),
    .chopped_clk(chopped_clk), .edge_clk(edge_clk));

  task automatic compare(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s got %b exp %b (dl mode=%b par=%b sel=%0d, g=%b)", name, got, exp,
               dl_mode, dl_parity, dl_sel, g_hist[7:0]);
    end
  endtask

  task automatic run_segment(input bit functional);
    int  left;             // steps left in the current clock level
    logic level;
    logic path;
    dl_sel  = 2'($urandom); shr_sel = 2'($urandom); str_sel = 2'($urandom);
    chp_sel = 2'($urandom);
    if (functional) begin
      clk_in_en = 1'b1; dl_mode = 1'b0; dl_parity = 1'($urandom);
      shr_test_sel = '0; str_test_sel = '0; chp_test_sel = '0;
      ed_test1 = 1'b1; ed_test2 = 1'b1;
    end else begin
      clk_in_en = ($urandom_range(0, 3) != 0); dl_mode = 1'b1; dl_parity = 1'($urandom);
      shr_test_sel = 2'($urandom); str_test_sel = 2'($urandom); chp_test_sel = 2'($urandom);
      ed_test1 = 1'($urandom); ed_test2 = 1'($urandom);
    end
    path  = !dl_mode || !(^{dl_sel, dl_parity});
    level = 1'b0;
    left  = $urandom_range(2, 6);
    for (int n = 0; n < 40; n++) begin
      logic t, e_shr, e_str, e_chp, e_ed, f_shr, f_str, f_chp;
      if (left == 0) begin
        level = ~level;
        left  = level ? $urandom_range(4, 9) : $urandom_range(2, 6);
      end
      left--;
      clk_in = level;
      g_hist = {g_hist[14:0], clk_in & clk_in_en};
      t      = path ? g_hist[int'(dl_sel) + 1] : 1'b1;
      t_hist = {t_hist[6:0], t};
      #1;
      e_shr = ref_shaper(REF_SHRINK,  2, t_hist, {1'b0, shr_sel}, {1'b0, shr_test_sel});
      e_str = ref_shaper(REF_STRETCH, 2, t_hist, {1'b0, str_sel}, {1'b0, str_test_sel});
      e_chp = ref_shaper(REF_CHOP,    2, t_hist, {1'b0, chp_sel}, {1'b0, chp_test_sel});
      f_shr = ref_shaper(REF_SHRINK,  2, t_hist, {1'b0, shr_sel}, 3'b0);
      f_str = ref_shaper(REF_STRETCH, 2, t_hist, {1'b0, str_sel}, 3'b0);
      f_chp = ref_shaper(REF_CHOP,    2, t_hist, {1'b0, chp_sel}, 3'b0);
      e_ed  = (ed_test1 & t_hist[0]) ^ (ed_test2 & t_hist[1]);
      compare("tuned_clk", tuned_clk, t);
      if (n >= 8) begin
        compare("shrunk_clk", shrunk_clk, e_shr);
        compare("stretched_clk", stretched_clk, e_str);
        compare("chopped_clk", chopped_clk, e_chp);
        compare("edge_clk", edge_clk, e_ed);
        // mechanisms, counted from what the outputs did
        if (path && t_hist[0] && !t_hist[1] && tuned_clk) n_delay_sel[dl_sel]++;
        if (!path && !(&g_hist[4:1]) && tuned_clk) n_parity_block++;
        if (clk_in && !clk_in_en && !tuned_clk) n_input_gate++;
        if (shr_test_sel == '0 && t_hist[0] && !shrunk_clk) n_shrink++;
        if (str_test_sel == '0 && !t_hist[0] && stretched_clk) n_stretch++;
        if (chp_test_sel == '0 && t_hist[0] && !chopped_clk) n_chop++;
        if (ed_test1 && ed_test2 && edge_clk) n_edge++;
        if (e_shr != f_shr || e_str != f_str || e_chp != f_chp) n_degate++;
      end
      @(posedge tick); #1;
    end
  endtask

  initial begin
    rst = 1'b1; clk_in = 1'b0; clk_in_en = 1'b1; dl_mode = 1'b0; dl_parity = 1'b0;
    dl_sel = '0; shr_sel = '0; shr_test_sel = '0; str_sel = '0; str_test_sel = '0;
    chp_sel = '0; chp_test_sel = '0; ed_test1 = 1'b1; ed_test2 = 1'b1;
    g_hist = '0; t_hist = '0;
    n_parity_block = 0; n_input_gate = 0; n_shrink = 0; n_stretch = 0;
    n_chop = 0; n_edge = 0; n_degate = 0;
    foreach (n_delay_sel[k]) n_delay_sel[k] = 0;
    repeat (6) @(posedge tick);
    #1 rst = 1'b0;

    for (int s = 0; s < 400; s++) run_segment(s % 2 == 0);

    $display("delay selections: %0d %0d %0d %0d", n_delay_sel[0], n_delay_sel[1],
             n_delay_sel[2], n_delay_sel[3]);
    $display("parity block %0d, input gate %0d, shrink %0d, stretch %0d, chop %0d, edge %0d, degate %0d",
             n_parity_block, n_input_gate, n_shrink, n_stretch, n_chop, n_edge, n_degate);
    foreach (n_delay_sel[k]) begin
      checks++;
      if (n_delay_sel[k] == 0) begin failures++; $display("delay selection %0d never used", k); end
    end
    checks += 7;
    if (n_parity_block == 0) begin failures++; $display("bad parity never blocked"); end
    if (n_input_gate == 0)   begin failures++; $display("input gate never held the clock"); end
    if (n_shrink == 0)       begin failures++; $display("no pulse shrunk"); end
    if (n_stretch == 0)      begin failures++; $display("no pulse stretched"); end
    if (n_chop == 0)         begin failures++; $display("no pulse chopped"); end
    if (n_edge == 0)         begin failures++; $display("no edge detected"); end
    if (n_degate == 0)       begin failures++; $display("no tap degated"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge tick);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

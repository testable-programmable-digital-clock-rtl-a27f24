// testable_delay_line - testable programmable digital delay line.
//
// The clock passes a chain of N_TAPS delay elements; tap k carries the clock
// delayed by (k+1)*D. The selector is OR-AND: tap k enters an OR gate together
// with one literal of each select bit and one parity literal, and the OR
// outputs meet in a single AND. A gate is open (passes its tap) only when all
// its literals are 0; every other gate outputs 1, the AND's non-controlling
// value. Gate k uses Sel_j where bit j of k is 0 and ~Sel_j where it is 1, so
// in functional mode exactly the gate with sel == k is open.
//
// Testability: without the parity literal a wrong or multiple selection cannot
// be seen in a static test, because every tap carries the same level. The
// parity input makes the valid patterns {sel, Parity} a distance-two code (even
// parity here): in test mode (mode = 1) gate k also needs Parity = ^k, so a
// single faulty select bit opens no gate and the output is stuck at 1, which a
// static test with the clock at 0 detects. The parity literals are degated by
// Mode, as the method's gate diagram shows: pt = Mode & Parity,
// pc = Mode & ~(Mode & Parity); with mode = 0 both are 0 and cannot disturb
// functional operation.
//
// Interface: sel[j] is Sel_j; clk_out follows clk_in after (sel+1)*D in
// functional mode, and in test mode when {sel, parity} has even parity.
// N_TAPS may be below 2**SEL_W; a code with no tap then selects nothing.
// Timing: D is DELAY_TICKS periods of the sampling clock tick; clk_out is
// combinational from the delay flops and the level inputs. The OR-AND
// selector, the parity gating and four taps follow the method; the
// select-to-tap order, even parity and the delay model are this design's own.
module testable_delay_line #(
  parameter int unsigned SEL_W       = 2,
  parameter int unsigned N_TAPS      = 2 ** SEL_W,
  parameter int unsigned DELAY_TICKS = 1
) (
  input  logic             tick,
  input  logic             rst,
  input  logic             clk_in,
  input  logic             mode,     // 0 functional, 1 test
  input  logic             parity,   // test parity input
  input  logic [SEL_W-1:0] sel,
  output logic             clk_out
);

  logic [N_TAPS-1:0] tap;           // tap[k] = clk_in delayed by (k+1)*D
  logic [N_TAPS-1:0] gate_out;      // OR-selector gate outputs
  logic [N_TAPS-1:0] gate_open;     // gate k has all its literals at 0
  logic [SEL_W-1:0]  sel_n;         // complemented select bits
  logic              pt;            // true parity phase, degated by mode
  logic              pt_n;          // its complement
  logic              pc;            // complement parity phase, degated by mode

  assign sel_n = ~sel;
  assign pt    = mode & parity;
  assign pt_n  = ~pt;
  assign pc    = mode & pt_n;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    localparam logic [SEL_W-1:0] CODE       = SEL_W'(k);
    localparam bit               NEED_PAR   = ^CODE;
    logic [SEL_W-1:0]            lit;       // select literals of gate k
    logic                        plit;      // parity literal of gate k

    if (k == 0) begin : g_first
      delay_element #(.DELAY_TICKS(DELAY_TICKS)) u_d (
        .tick (tick), .rst (rst), .d (clk_in), .q (tap[k])
      );
    end else begin : g_next
      delay_element #(.DELAY_TICKS(DELAY_TICKS)) u_d (
        .tick (tick), .rst (rst), .d (tap[k-1]), .q (tap[k])
      );
    end

    // Literals: Sel_j where CODE bit j is 0, ~Sel_j where it is 1; pc where
    // the gate needs Parity = 1, pt where it needs Parity = 0.
    for (genvar j = 0; j < SEL_W; j++) begin : g_lit
      assign lit[j] = CODE[j] ? sel_n[j] : sel[j];
    end
    assign plit         = NEED_PAR ? pc : pt;
    assign gate_open[k] = ~(|lit) & ~plit;
    assign gate_out[k]  = tap[k] | (|lit) | plit;
  end

  assign clk_out = &gate_out;

  // Functional mode always opens exactly one selector gate; test mode opens
  // one gate for a valid (even parity) pattern and none otherwise.
  a_one_path_functional : assert property (@(posedge tick) disable iff (rst)
    (!mode && (int'(sel) < N_TAPS)) |-> $onehot(gate_open));
  a_parity_test : assert property (@(posedge tick) disable iff (rst)
    (mode && (int'(sel) < N_TAPS)) |->
      ($countones(gate_open) == ((^{sel, parity}) ? 0 : 1)));

endmodule

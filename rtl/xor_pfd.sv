// xor_pfd: low-noise XOR-type phase-frequency detector (asynchronous,
// three feedback variables F, G, H).
//
// Purpose: an XOR gate is a phase detector with a single, linear output and
// hence low PLL phase noise, but it cannot detect frequency. This circuit
// keeps the XOR behaviour while the loop is near lock and adds frequency
// detection: PD is low on average when V is too fast and high on average
// when V is too slow, so the PLL always pulls in, locking with V leading R
// by 90 degrees. Lock is high while the inputs run in the forward sequence.
//
// How it works. Each input combination RV (a "column") has three stable
// states, twelve in all, numbered as in the detector's flow graph:
//   L (locked)        states 5, 2, 7, 4  - the last edge was a forward edge
//   A (first reverse) states 1, 8, 3, 6  - a reverse edge straight after L
//   D (deep reverse)  states 9, 12, 11, 10 - a reverse edge after A or D
// A forward edge (V rising at RV=00, R rising at 01, V falling at 11, R
// falling at 10) always leads to L; a reverse edge leads from L to A and
// from A or D to D. PD is XNOR(R,V) in L and D and XOR(R,V) in A. So in the
// forward sequence PD is a plain XOR-type detector output, while a V that is
// too fast or too slow keeps the circuit toggling between A and L states
// with PD held low or high.
//
// State assignment (this design's own). F = C(R, V) and G = C(R, !V) are
// C-elements as in bpsk_pd; together with R and V they tell whether the
// last edge was forward (function last_edge_forward, which is also Lock).
// H is 1 in the D states only. Codes {F,G,H}: states 1, 2 = 000;
// 5, 8 = 010; 6, 7 = 100; 3, 4 = 110; 9 = 001; 12 = 011; 10 = 101; 11 = 111.
// On an edge the input column changes first and the C-element that is
// forced by the new column (F in columns 00/11, G in 01/10) still holds its
// old value; "pend" flags that. A reverse edge arriving while pend is set
// came from a reverse state, so H is set first and the C-element is held
// ("hold") until H has risen. Every transition is thus a sequence of
// single-variable changes: there are no critical races.
//
// Interface and timing: r is the reference, v the VCO output, rst_n the
// reset Rst (active low: 0 clears F, G and H, like the published equations'
// "& Rst" term). pd drives the loop filter, pd_n is its complement for a
// differential loop-filter input, lock is the phase lock output. There is
// no clock: outputs follow each input edge after the feedback settles (at
// most two variable changes; zero time in RTL simulation). Inputs must
// change one at a time (fundamental mode).
//
// What follows the published design: the flow graph (states, transitions,
// which states are locked), three feedback variables F, G, H, the inputs R,
// V, Rst, the outputs PD and Lock, and the PD polarity (low on average when
// V is too fast). The state assignment and the next-state equations are this
// design's own, derived from the flow graph; pd_n is the complementary
// output the design suggests for differential drive.
//
// The feedback through f, g and h is a deliberate combinational loop: that
// is the circuit (an asynchronous state machine), so loop warnings from lint
// or synthesis on f, g and h are expected.
module xor_pfd
  import pd_pkg::*;
(
  input  logic r,
  input  logic v,
  input  logic rst_n,
  output logic pd,
  output logic pd_n,
  output logic lock
);

  logic f, g, h;  // feedback variables
  logic fwd;      // last input edge was a forward-sequence edge

  assign fwd = last_edge_forward(r, v, f, g);

  // Next-state equations. Behaviourally:
  //   pend = (R == V) ? F != R : G != R   (forced C-element not yet switched)
  //   hold = !fwd & pend & !H             (reverse edge out of an A state)
  //   F    = hold ? F : C(R, V, F)
  //   G    = hold ? G : C(R, !V, G)
  //   H    = !fwd & (H | pend)
  // Each is written below as the sum of all its prime implicants, so that
  // every single-variable change that keeps a feedback variable at 1 is
  // covered by one product term (no static hazards in a two-level
  // realisation).
  assign f = rst_n & ( (f & !g & !h) | (r & f) | (v & f) |
                       (r & v & !g) | (r & v & h) );

  assign g = rst_n & ( (!v & g) | (r & g) | (f & g & !h) |
                       (r & !v & f) | (r & !v & h) );

  assign h = rst_n & ( (!r & !v & !g & h) | (!r & !v & f & !g) |
                       (!r & f & !g & h)  | (!r & v & f & g)   |
                       (!r & v & f & h)   | (!v & !f & !g & h) |
                       (r & !f & g & h)   | (r & !v & !f & !g) |
                       (r & !v & !f & h)  | (r & v & !f & g)   |
                       (r & v & g & h)    | (v & f & g & h) );

  // A states (first reverse edge after lock) invert the XOR response.
  assign pd   = (r ~^ v) ^ (!fwd && !h);
  assign pd_n = ~pd;
  assign lock = fwd;

endmodule

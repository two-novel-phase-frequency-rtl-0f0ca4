// bpsk_pd: asynchronous BPSK phase detector (two feedback variables F, G).
//
// Purpose: a phase detector that lets an ordinary PLL lock onto a BPSK
// carrier. While the inputs run in the forward sequence RV = 00, 01, 11, 10
// it behaves as an XOR phase detector; when the carrier R jumps by 180
// degrees the inputs run in the reverse sequence and PD is inverted, so the
// loop sees a second stable lock point 180 degrees away instead of positive
// feedback. Which sequence is running is the demodulated data bit, BPSK.
//
// How it works: F = C(R, V) and G = C(R, !V) are C-elements built as
// combinational feedback loops (see pd_pkg). Each input edge changes at most
// one of them, so the circuit is free of critical races. Between them they
// record which input made the last edge: PD = F xor G is 0 after a V edge
// and 1 after an R edge, and BPSK = 1 after a forward-sequence edge. In the
// eight states of the circuit's flow graph, {F,G} is 00 in states 1 and 2,
// 01 in 5 and 8, 11 in 3 and 4, 10 in 6 and 7; states 5, 2, 7, 4 give
// BPSK = 1 and states 1, 8, 3, 6 give BPSK = 0.
//
// Interface and timing: r is the received BPSK carrier, v the VCO output;
// pd drives the loop filter and pd_n is its complement for a differential
// loop-filter input. There is no clock: outputs follow each input edge after
// the gate delays of the feedback loop (zero in RTL simulation). Inputs are
// assumed to change one at a time (fundamental mode), as for any
// asynchronous sequential circuit. There is no reset: whatever F and G power
// up with, the first edge on each input puts the circuit in a valid state.
//
// The PD, F and BPSK equations, the two feedback variables and the flow
// graph follow the published design; G is C(R, !V), with which those
// equations reproduce the flow graph. PD is low after a V edge, so it is
// low on average when V is too fast. The pd_n output is the complementary
// output the design suggests for differential drive.
//
// The feedback through f and g is a deliberate combinational loop: that is
// the circuit (an asynchronous state machine), so loop warnings from lint
// or synthesis on f and g are expected.
module bpsk_pd
  import pd_pkg::*;
(
  input  logic r,
  input  logic v,
  output logic pd,
  output logic pd_n,
  output logic bpsk
);

  logic f;  // C(R, V): 1 after RV=11, 0 after RV=00
  logic g;  // C(R, !V): 1 after RV=10, 0 after RV=01

  assign f = c_elem(r,  v, f);
  assign g = c_elem(r, !v, g);

  assign pd   = f ^ g;
  assign pd_n = ~pd;
  assign bpsk = last_edge_forward(r, v, f, g);

endmodule

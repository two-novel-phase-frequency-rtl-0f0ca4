// pd_pkg: logic shared by the two asynchronous phase detectors.
//
// Both detectors (xor_pfd and bpsk_pd) remember the input history in
// feedback variables that behave as C-elements (Muller elements): a
// C-element copies its two inputs when they agree and holds its value when
// they disagree. With F = C(R, V) and G = C(R, !V), one of the two is always
// "holding" and its value tells which neighbouring input combination the
// circuit came from, i.e. which input made the last edge. The function
// last_edge_forward() decodes that into one bit: 1 when the last edge
// belongs to the forward sequence RV = 00 -> 01 -> 11 -> 10 -> 00
// (V leading R), 0 when it belongs to the reverse sequence.
//
// last_edge_forward() is the BPSK output equation of the BPSK detector; the
// same term gives the Lock output of the XOR-type detector. It reads only the
// feedback variable that holds in the present input column, so it is valid
// as soon as an input changes, before F or G react.
//
// Both functions are pure combinational logic. c_elem() is called with its
// own result fed back as q (for example assign f = c_elem(r, v, f)), so
// tools report a combinational loop through it. That loop is the storage of
// the asynchronous circuit and is intended.
package pd_pkg;

  // Muller C-element: follows a and b when they agree, otherwise holds q.
  function automatic logic c_elem(input logic a, input logic b, input logic q);
    return (a & b) | (a & q) | (b & q);
  endfunction

  // 1 when the last input edge was a forward-sequence edge
  // (V rising at RV=00, R rising at 01, V falling at 11, R falling at 10).
  function automatic logic last_edge_forward(input logic r, input logic v,
                                             input logic f, input logic g);
    return (!r & !v &  g) | (!r &  v & !f) |
           ( r &  v & !g) | ( r & !v &  f);
  endfunction

endpackage

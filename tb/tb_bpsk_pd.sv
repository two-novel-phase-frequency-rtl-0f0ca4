// tb_bpsk_pd: self-checking testbench for the BPSK phase detector.
//
// The reference is the detector's flow graph as a table of state numbers
// 1..8: next state on an R toggle and on a V toggle, the BPSK level (1 in
// the forward-sequence states 5, 2, 7, 4) and the graph's output level, of
// which PD is the complement. The detector has no reset, so the first two
// edges (one on each input) bring it into a known state; from then on PD,
// PD_n and BPSK are compared with the table after every toggle. Forward and
// reverse sequences, flips between them (a BPSK data change), either input
// running faster, and random toggles are applied; all 16 transitions must be
// exercised.
module tb_bpsk_pd;

  logic r, v;
  logic pd, pd_n, bpsk;

  bpsk_pd dut (.r(r), .v(v), .pd(pd), .pd_n(pd_n), .bpsk(bpsk));

  int checks = 0;
  int failures = 0;

  int unsigned nxt_r [1:8] = '{8, 7, 6, 5, 8, 7, 6, 5};
  int unsigned nxt_v [1:8] = '{2, 1, 4, 3, 2, 1, 4, 3};
  bit          out_g [1:8] = '{1, 1, 1, 1, 0, 0, 0, 0};
  bit          fwd   [1:8] = '{0, 1, 0, 1, 1, 0, 1, 0};

  int unsigned st;
  bit covered_r [1:8];
  bit covered_v [1:8];

  task automatic check_outputs(string what);
    checks++;
    if (pd !== !out_g[st] || pd_n !== out_g[st] || bpsk !== fwd[st]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: state %0d RV=%b%b pd=%b pd_n=%b bpsk=%b (want pd=%b bpsk=%b)",
                 what, st, r, v, pd, pd_n, bpsk, !out_g[st], fwd[st]);
    end
  endtask

  task automatic toggle_r();
    covered_r[st] = 1'b1;
    st = nxt_r[st];
    r = ~r;
    #1 check_outputs("R edge");
  endtask

  task automatic toggle_v();
    covered_v[st] = 1'b1;
    st = nxt_v[st];
    v = ~v;
    #1 check_outputs("V edge");
  endtask

  task automatic forward_step();
    if (r == v) toggle_v(); else toggle_r();
  endtask

  task automatic reverse_step();
    if (r == v) toggle_r(); else toggle_v();
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cov;
  initial begin
    // power-up: F and G hold arbitrary values; one edge on each input
    // fixes the state (RV 00 -> 10 -> 11 ends in state 3)
    r = 1'b0; v = 1'b0;
    #1 r = 1'b1;
    #1 v = 1'b1;
    st = 3;
    #1 check_outputs("power-up");
    repeat (12) forward_step();
    repeat (12) reverse_step();   // data change: BPSK falls, PD inverts
    repeat (12) forward_step();   // and back
    repeat (6) begin toggle_v(); toggle_v(); toggle_r(); end
    repeat (6) begin toggle_r(); toggle_r(); toggle_v(); end
    repeat (3000) begin
      if ($urandom_range(1) == 0) toggle_r(); else toggle_v();
    end
    cov = 0;
    for (int s = 1; s <= 8; s++) cov += int'(covered_r[s]) + int'(covered_v[s]);
    checks++;
    if (cov != 16) begin
      failures++;
      $display("FAIL only %0d of 16 flow-graph transitions exercised", cov);
    end
    $display("transitions exercised: %0d of 16", cov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

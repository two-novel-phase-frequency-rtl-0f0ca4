// tb_xor_pfd: self-checking testbench for the XOR-type phase-frequency
// detector.
//
// The reference is the detector's flow graph written as a table of state
// numbers 1..12: for each state the next state when R toggles and when V
// toggles, whether Lock is high (states 5, 2, 7, 4) and the graph's output
// level, of which PD is the complement (PD is low while V runs too fast).
// The table is independent of the F/G/H encoding inside the module.
//
// Stimulus: reset at RV=00 (state 1), then phases of forward sequences,
// reverse sequences, V faster than R, R faster than V and random single
// input toggles. After every toggle PD, PD_n and Lock are compared with the
// table. Every one of the 24 transitions of the graph must be exercised,
// and a reset in the middle of operation is checked too.
module tb_xor_pfd;

  logic r, v, rst_n;
  logic pd, pd_n, lock;

  xor_pfd dut (.r(r), .v(v), .rst_n(rst_n), .pd(pd), .pd_n(pd_n), .lock(lock));

  int checks = 0;
  int failures = 0;

  // flow graph: next state on an R toggle / a V toggle, outputs per state
  int unsigned nxt_r [1:12] = '{12, 7, 10, 5, 8, 7, 6, 5, 12, 7, 10, 5};
  int unsigned nxt_v [1:12] = '{ 2, 1,  4, 3, 2, 9, 4, 11, 2, 9,  4, 11};
  bit          out_g [1:12] = '{1, 1, 1, 1, 0, 0, 0, 0, 0, 1, 0, 1};
  bit          lk    [1:12] = '{0, 1, 0, 1, 1, 0, 1, 0, 0, 0, 0, 0};

  int unsigned st;
  bit covered_r [1:12];
  bit covered_v [1:12];

  task automatic check_outputs(string what);
    checks++;
    if (pd !== !out_g[st] || pd_n !== out_g[st] || lock !== lk[st]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: state %0d RV=%b%b pd=%b pd_n=%b lock=%b (want pd=%b lock=%b)",
                 what, st, r, v, pd, pd_n, lock, !out_g[st], lk[st]);
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

  // forward sequence RV 00->01->11->10->00: V leads R
  task automatic forward_step();
    if (r == v) toggle_v(); else toggle_r();
  endtask

  // reverse sequence RV 00->10->11->01->00: R leads V
  task automatic reverse_step();
    if (r == v) toggle_r(); else toggle_v();
  endtask

  task automatic do_reset();
    rst_n = 1'b0; r = 1'b0; v = 1'b0;
    #1 rst_n = 1'b1;
    st = 1;
    #1 check_outputs("reset");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cov;
  initial begin
    do_reset();
    // forward sequence from reset: lock in, Lock high in 5,2,7,4
    repeat (12) forward_step();
    // BPSK-like flip into the reverse sequence and back
    repeat (12) reverse_step();
    repeat (12) forward_step();
    // V faster than R: V toggles twice per R edge, both R levels
    repeat (6) begin toggle_v(); toggle_v(); toggle_r(); end
    // R faster than V
    repeat (6) begin toggle_r(); toggle_r(); toggle_v(); end
    // a short reverse excursion from lock, one reverse edge only
    repeat (4) begin forward_step(); reverse_step(); forward_step(); forward_step(); end
    // reset in the middle of operation
    repeat (3) reverse_step();
    do_reset();
    repeat (8) forward_step();
    // random single-input toggles
    repeat (4000) begin
      if ($urandom_range(1) == 0) toggle_r(); else toggle_v();
    end
    cov = 0;
    for (int s = 1; s <= 12; s++) cov += int'(covered_r[s]) + int'(covered_v[s]);
    checks++;
    if (cov != 24) begin
      failures++;
      $display("FAIL only %0d of 24 flow-graph transitions exercised", cov);
    end
    $display("transitions exercised: %0d of 24", cov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_pll_loop: both detectors closed in a phase-locked loop.
//
// Each detector of two_pfd_top drives its own loop: a behavioural loop
// filter and VCO modelled here in real arithmetic, since both are analogue
// parts outside the logic. Time runs in ticks; the reference R has a period
// of 720 ticks.
//   loop filter  y   += (PD - y) / 360            (first-order low pass)
//                I   += (PD - 1/2) / 720          (integrator, type-2 loop)
//   VCO          f_v  = f_0 * (1 + 0.5 (y - 1/2) + 0.5 I)   cycles per tick
//                V    = 1 while the VCO phase is in the first half cycle
// PD high means V is too slow, so the control raises f_v. R is updated
// first and V half a tick later, so the detector inputs never change
// together.
//
// XOR-type detector loop: the VCO starts at 0.2, 0.5, 2 and 5 times the
// reference frequency. Within 250 reference periods it must be locked: in
// the last 50 periods Lock stays high and V leads R by 90 degrees
// (V phase 0.25 +/- 0.015 cycles at each rising R edge).
//
// BPSK detector loop: R is a carrier whose phase flips by 180 degrees with
// each random data bit (8 carrier periods per bit); the VCO starts at 0.5,
// 0.7, 0.8 and 1.25 times the carrier frequency. The BPSK output, averaged
// over the second half of each bit (the data low-pass filter), must give
// every one of the last 60 bits with one fixed polarity, as BPSK carries a
// 180 degree ambiguity.
module tb_pll_loop;

  localparam int TR = 720;          // reference period, ticks
  localparam int BIT_LEN = 8 * TR;  // BPSK bit length, ticks
  localparam int N_BITS = 120;

  logic r_x, v_x, rst_n;
  logic r_b, v_b;
  logic x_pd, x_pd_n, x_lock;
  logic b_pd, b_pd_n, b_data;

  two_pfd_top dut (
    .pfd_r(r_x), .pfd_v(v_x), .pfd_rst_n(rst_n),
    .pfd_pd(x_pd), .pfd_pd_n(x_pd_n), .pfd_lock(x_lock),
    .bpsk_r(r_b), .bpsk_v(v_b),
    .bpsk_pd(b_pd), .bpsk_pd_n(b_pd_n), .bpsk_data(b_data)
  );

  int checks = 0;
  int failures = 0;
  int n_acq_up = 0, n_acq_down = 0, n_bpsk_lock = 0, n_data_change = 0;

  // behavioural loop filter and VCO state, one set per loop
  real ph_x, y_x, i_x, f0_x;
  real ph_b, y_b, i_b, f0_b;

  function automatic real vco_freq(real f0, real y, real integ);
    real f;
    f = f0 * (1.0 + 0.5 * (y - 0.5) + 0.5 * integ);
    if (f < 0.1 / TR) f = 0.1 / TR;
    return f;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ratio_x [4] = '{0.2, 0.5, 2.0, 5.0};
  real ratio_b [4] = '{0.5, 0.7, 0.8, 1.25};
  bit  data_bits [N_BITS];
  int  acc_b, lock_bad, phase_bad, x_lock_period, pol, bits_bad, d_prev;
  real vphase;

  initial begin
    r_x = 1'b0; v_x = 1'b0; r_b = 1'b0; v_b = 1'b0; rst_n = 1'b0;
    #1 rst_n = 1'b1;
    #1;
    for (int sc = 0; sc < 4; sc++) begin
      f0_x = ratio_x[sc] / TR; f0_b = ratio_b[sc] / TR;
      ph_x = 0.123; y_x = 0.5; i_x = 0.0;
      ph_b = 0.123; y_b = 0.5; i_b = 0.0;
      for (int b = 0; b < N_BITS; b++) data_bits[b] = 1'($urandom_range(1));
      lock_bad = 0; phase_bad = 0; x_lock_period = -1; acc_b = 0;
      pol = -1; bits_bad = 0; d_prev = 0;
      for (int t = 0; t < N_BITS * BIT_LEN; t++) begin
        bit d;
        logic r_new;
        d = data_bits[t / BIT_LEN];
        r_new = ((t % TR) < TR / 2);
        r_x = r_new;
        r_b = r_new ^ d;
        #1;
        // VCOs
        ph_x = ph_x + vco_freq(f0_x, y_x, i_x);
        if (ph_x >= 1.0) ph_x = ph_x - 1.0;
        ph_b = ph_b + vco_freq(f0_b, y_b, i_b);
        if (ph_b >= 1.0) ph_b = ph_b - 1.0;
        v_x = (ph_x < 0.5);
        v_b = (ph_b < 0.5);
        #1;
        // loop filters
        y_x = y_x + (real'(x_pd) - y_x) / 360.0;
        i_x = i_x + (real'(x_pd) - 0.5) / TR;
        y_b = y_b + (real'(b_pd) - y_b) / 360.0;
        i_b = i_b + (real'(b_pd) - 0.5) / TR;

        // XOR-type loop: judged over reference periods 250..299
        if (t < 300 * TR) begin
          if (t % TR == 0) begin
            // V phase at the rising R edge; 0.25 cycle = V leads by 90 deg
            vphase = ph_x;
            if (t >= 250 * TR && (vphase < 0.235 || vphase > 0.265)) phase_bad++;
            if (vphase < 0.235 || vphase > 0.265) x_lock_period = t / TR;
          end
          if (t >= 250 * TR && !x_lock) lock_bad++;
        end

        // BPSK loop: data low-pass filter = average over the second half of a bit
        if (t % BIT_LEN >= BIT_LEN / 2) acc_b += int'(b_data);
        if (t % BIT_LEN == BIT_LEN - 1) begin
          int bitno;
          bit got;
          bitno = t / BIT_LEN;
          got = (acc_b > BIT_LEN / 4);
          if (bitno >= N_BITS - 60) begin
            if (pol < 0) pol = int'(got ^ d);
            if (int'(got ^ d) != pol || acc_b == BIT_LEN / 4) bits_bad++;
            if (bitno > N_BITS - 60 && int'(d) != d_prev) n_data_change++;
          end
          d_prev = int'(d);
          acc_b = 0;
        end
      end
      $display("scenario %0d: XOR-type loop from %4.2f x f_R: phase error beyond 5.4 deg last seen in period %0d, Lock low %0d ticks, V phase %5.3f cycles | BPSK loop from %4.2f x f_R: %0d of 60 bits wrong, polarity %0d",
               sc, ratio_x[sc], x_lock_period, lock_bad, vphase, ratio_b[sc], bits_bad, pol);
      check($sformatf("scenario %0d XOR-type loop keeps Lock high", sc), lock_bad == 0);
      check($sformatf("scenario %0d XOR-type loop locks with V leading by 90 deg", sc), phase_bad == 0);
      check($sformatf("scenario %0d BPSK loop recovers the data", sc), bits_bad == 0);
      if (lock_bad == 0 && phase_bad == 0) begin
        if (ratio_x[sc] < 1.0) n_acq_up++; else n_acq_down++;
      end
      if (bits_bad == 0) n_bpsk_lock++;
    end
    $display("mechanisms: acquisitions from below %0d, from above %0d, BPSK loops locked %0d, data changes tracked %0d",
             n_acq_up, n_acq_down, n_bpsk_lock, n_data_change);
    check("every mechanism happened",
          n_acq_up > 0 && n_acq_down > 0 && n_bpsk_lock > 0 && n_data_change > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_two_pfd_top: end-to-end testbench of both phase detectors.
//
// The same R and V square waves drive both detectors, as when their
// behaviour is compared side by side. Time is counted in ticks; R and V are
// generated from tick counters, R is updated first and V half a tick later,
// so the two inputs never change together. PD, Lock and BPSK are sampled
// once per tick and averaged, which stands in for the loop filter.
//
// Workloads and what is checked against values worked out here, not taken
// from the design:
//  1. Phase characteristic: R and V at the same frequency (720 ticks per
//     period, 2 ticks per degree) with V leading R by 30..330 degrees.
//     Average PD of an XOR detector that reports XNOR is 1 - phi/180 for
//     phi < 180; beyond 180 degrees the XOR-type detector keeps the
//     triangle, (phi - 180)/180, while the BPSK detector inverts it,
//     (360 - phi)/180, giving its second lock point at 270 degrees.
//     Lock and BPSK must be 1 for phi < 180 and 0 above.
//  2. Frequency detection: V three and five times faster than R must give
//     PD low on average (< 0.4), V three and five times slower PD high on
//     average (> 0.6), for both detectors. (Within about 25 % of R the flow
//     graph gives little bias, so large ratios are used; the V phase is
//     offset so that no V edge falls on an R edge.)
//  3. BPSK reception: R is a carrier whose phase flips by 180 degrees with
//     each data bit (16 random bits of 8 carrier periods), V the recovered
//     carrier leading by 90 degrees. In the second half of every bit the
//     BPSK output must equal the inverted data bit, the BPSK detector's PD
//     must average 0.5 (lock kept) and Lock of the XOR-type detector must
//     be high for the forward and low for the reverse sequence.
//  4. Reset of the XOR-type detector in the middle of operation.
// Every mechanism (lock, reverse sequence, both frequency-detection
// directions, BPSK data changes, reset) is counted and must occur.
module tb_two_pfd_top;

  logic r, v, rst_n;
  logic pfd_pd, pfd_pd_n, pfd_lock;
  logic bpsk_pd, bpsk_pd_n, bpsk_data;

  two_pfd_top dut (
    .pfd_r(r), .pfd_v(v), .pfd_rst_n(rst_n),
    .pfd_pd(pfd_pd), .pfd_pd_n(pfd_pd_n), .pfd_lock(pfd_lock),
    .bpsk_r(r), .bpsk_v(v),
    .bpsk_pd(bpsk_pd), .bpsk_pd_n(bpsk_pd_n), .bpsk_data(bpsk_data)
  );

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_lock_rise = 0, n_lock_fall = 0, n_data_change = 0;
  int n_vfast = 0, n_vslow = 0, n_reset = 0, n_reverse = 0;

  // stimulus state
  longint t = 0;       // tick counter
  int tr = 720;        // R period in ticks
  int tv = 720;        // V period in ticks
  int voff = 0;        // V advance in ticks
  bit flip = 1'b0;     // BPSK phase flip of R

  // accumulated over a measurement window
  int n_s, s_pfd, s_bpd, s_lock, s_data, s_comp;

  task automatic clear_acc();
    n_s = 0; s_pfd = 0; s_bpd = 0; s_lock = 0; s_data = 0; s_comp = 0;
  endtask

  function automatic logic sq(longint tt, int period);
    return ((tt % period) < (period / 2));
  endfunction

  // advance n ticks
  task automatic run(int n);
    repeat (n) begin
      logic lk_old, bd_old;
      lk_old = pfd_lock; bd_old = bpsk_data;
      r = sq(t, tr) ^ flip;
      #1;
      v = sq(t + voff, tv);
      #1;
      t++;
      n_s++;
      s_pfd  += int'(pfd_pd);
      s_bpd  += int'(bpsk_pd);
      s_lock += int'(pfd_lock);
      s_data += int'(bpsk_data);
      s_comp += int'(pfd_pd_n == !pfd_pd && bpsk_pd_n == !bpsk_pd);
      if (!lk_old && pfd_lock) n_lock_rise++;
      if (lk_old && !pfd_lock) n_lock_fall++;
      if (bd_old != bpsk_data) n_data_change++;
    end
  endtask

  task automatic check_avg(string what, real got, real lo, real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: %f not in [%f, %f]", what, got, lo, hi);
    end
  endtask

  task automatic check_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b", what, got, want);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real want_x, want_b, tol;
  bit  data_bits [16];
  initial begin
    r = 1'b0; v = 1'b0; rst_n = 1'b0;
    #1 rst_n = 1'b1;
    n_reset++;
    #1;

    // 1. phase characteristic
    tol = 0.01 + 2.0 / 720.0;
    for (int phi = 30; phi < 360; phi += 30) begin
      if (phi == 180) continue;
      tr = 720; tv = 720; voff = phi * 2;
      clear_acc();
      run(4 * 720);
      clear_acc();
      run(10 * 720);
      if (phi < 180) begin
        want_x = 1.0 - phi / 180.0;
        want_b = want_x;
      end else begin
        want_x = (phi - 180) / 180.0;
        want_b = (360 - phi) / 180.0;
        n_reverse++;
      end
      $display("phase %0d deg: xor_pfd PD %5.3f (want %5.3f) lock %5.3f | bpsk_pd PD %5.3f (want %5.3f) bpsk %5.3f",
               phi, real'(s_pfd) / n_s, want_x, real'(s_lock) / n_s,
               real'(s_bpd) / n_s, want_b, real'(s_data) / n_s);
      check_avg($sformatf("xor_pfd PD at %0d deg", phi), real'(s_pfd) / n_s, want_x - tol, want_x + tol);
      check_avg($sformatf("bpsk_pd PD at %0d deg", phi), real'(s_bpd) / n_s, want_b - tol, want_b + tol);
      check_avg($sformatf("lock at %0d deg", phi), real'(s_lock) / n_s,
                phi < 180 ? 1.0 : 0.0, phi < 180 ? 1.0 : 0.0);
      check_avg($sformatf("bpsk at %0d deg", phi), real'(s_data) / n_s,
                phi < 180 ? 1.0 : 0.0, phi < 180 ? 1.0 : 0.0);
      check_avg("complementary outputs", real'(s_comp) / n_s, 1.0, 1.0);
    end

    // 2. frequency detection, V 5x and 3x faster, 3x and 5x slower than R
    for (int k = 0; k < 4; k++) begin
      int periods [4] = '{144, 240, 2160, 3600};
      tr = 720; tv = periods[k]; voff = 37;
      clear_acc();
      run(2 * 720);
      clear_acc();
      run(40 * 720);
      $display("V period %0d vs R period 720: xor_pfd PD %5.3f lock %5.3f | bpsk_pd PD %5.3f",
               tv, real'(s_pfd) / n_s, real'(s_lock) / n_s, real'(s_bpd) / n_s);
      if (tv < tr) begin
        check_avg("xor_pfd PD, V fast", real'(s_pfd) / n_s, 0.0, 0.4);
        check_avg("bpsk_pd PD, V fast", real'(s_bpd) / n_s, 0.0, 0.4);
        if (real'(s_pfd) / n_s < 0.4) n_vfast++;
      end else begin
        check_avg("xor_pfd PD, V slow", real'(s_pfd) / n_s, 0.6, 1.0);
        check_avg("bpsk_pd PD, V slow", real'(s_bpd) / n_s, 0.6, 1.0);
        if (real'(s_pfd) / n_s > 0.6) n_vslow++;
      end
    end

    // 3. BPSK reception: V locked 90 degrees ahead of the carrier
    tr = 720; tv = 720; voff = 180; flip = 1'b0;
    t = (t / 720 + 1) * 720;   // restart on a carrier period boundary
    run(4 * 720);
    for (int b = 0; b < 16; b++) data_bits[b] = 1'($urandom_range(1));
    data_bits[1] = ~data_bits[0];   // at least one change
    for (int b = 0; b < 16; b++) begin
      flip = data_bits[b];          // changes only at t mod 720 == 0
      run(4 * 720);
      clear_acc();
      run(4 * 720);
      check_avg($sformatf("bit %0d BPSK output", b), real'(s_data) / n_s,
                flip ? 0.0 : 1.0, flip ? 0.0 : 1.0);
      check_avg($sformatf("bit %0d xor_pfd Lock", b), real'(s_lock) / n_s,
                flip ? 0.0 : 1.0, flip ? 0.0 : 1.0);
      check_avg($sformatf("bit %0d bpsk_pd PD average", b), real'(s_bpd) / n_s, 0.5 - tol, 0.5 + tol);
      if (flip) n_reverse++;
    end

    // 4. reset in the middle of operation, at RV = 00
    while (!(r == 1'b0 && v == 1'b0)) run(1);
    rst_n = 1'b0;
    #1;
    check_bit("Lock during reset", pfd_lock, 1'b0);
    rst_n = 1'b1;
    #1;
    check_bit("Lock after reset at RV=00", pfd_lock, 1'b0);
    check_bit("PD after reset at RV=00", pfd_pd, 1'b0);
    n_reset++;
    flip = 1'b0;
    run(4 * 720);
    check_bit("Lock regained after reset", pfd_lock, 1'b1);

    $display("mechanisms: lock rises %0d, lock falls %0d, reverse-sequence runs %0d, V-fast %0d, V-slow %0d, BPSK data changes %0d, resets %0d",
             n_lock_rise, n_lock_fall, n_reverse, n_vfast, n_vslow, n_data_change, n_reset);
    checks++;
    if (n_lock_rise == 0 || n_lock_fall == 0 || n_reverse == 0 || n_vfast == 0 ||
        n_vslow == 0 || n_data_change == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// two_pfd_top: the two asynchronous phase detectors side by side.
//
// The design consists of two independent detectors, each meant to sit in a
// PLL together with an external loop filter and VCO:
//   * xor_pfd - XOR-type phase-frequency detector with a Lock output, for a
//     low-phase-noise PLL that still acquires frequency on its own;
//   * bpsk_pd - BPSK phase detector whose PLL stays locked through the
//     180 degree phase jumps of a BPSK carrier and whose BPSK output, after
//     a low-pass filter, is the demodulated data.
// The loop filters, the VCOs and the data low-pass filter are analogue parts
// outside this logic: each detector's PD (and PD_n) pin goes to its loop
// filter, the VCO output comes back on the V pin, and the BPSK pin goes to
// the data filter.
//
// Interface and timing: plain pins, no clock. Each output follows the edges
// on its detector's R and V inputs after the settling of that detector's
// feedback loop. Inputs of one detector must change one at a time. Only the
// XOR-type detector has a reset (rst_n, active low); the BPSK detector
// settles into a valid state after its first input edges. Placing both
// detectors in one top is this design's own arrangement.
module two_pfd_top (
  // XOR-type phase-frequency detector
  input  logic pfd_r,
  input  logic pfd_v,
  input  logic pfd_rst_n,
  output logic pfd_pd,
  output logic pfd_pd_n,
  output logic pfd_lock,
  // BPSK phase detector
  input  logic bpsk_r,
  input  logic bpsk_v,
  output logic bpsk_pd,
  output logic bpsk_pd_n,
  output logic bpsk_data
);

  xor_pfd u_xor_pfd (
    .r     (pfd_r),
    .v     (pfd_v),
    .rst_n (pfd_rst_n),
    .pd    (pfd_pd),
    .pd_n  (pfd_pd_n),
    .lock  (pfd_lock)
  );

  bpsk_pd u_bpsk_pd (
    .r    (bpsk_r),
    .v    (bpsk_v),
    .pd   (bpsk_pd),
    .pd_n (bpsk_pd_n),
    .bpsk (bpsk_data)
  );

endmodule

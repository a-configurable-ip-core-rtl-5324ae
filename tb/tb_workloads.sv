// tb_workloads: bit-error-rate runs of the synchronization core on noisy
// QPSK bursts, for the input widths, burst-length builds and search windows
// the core is meant to be configured with.
//
// Every lane (wl_lane) is one core build with its own burst source and bit
// counter.  All bursts carry a frequency offset of 1.2 % of the symbol rate
// and a phase offset of 30 degrees.  The reference is ideal coherent
// Gray-coded QPSK, BER = Q(sqrt(Es/N0)).
//
//   A. input width: BW = 4, 5, 6, 7 with MBL = 512, L = 300 symbols,
//      Es/N0 = 6, 8, 10 dB, no window.
//   B. maximum burst length: MBL = 256 and 512 with BW = 6, L = 150,
//      Es/N0 = 6, 8, 10 dB, no window.
//   C. window: MBL = 256, BW = 6, L = 150, Es/N0 = 3, 4, 5 dB, no window
//      and w_u = 30, 60, 120 bins (1.5, 3 and 6 % of the symbol rate at
//      M = 4, N = 512), w_l = N - w_u.
//   D. higher order: 8PSK on a build for M up to 8 (LOG2M_MAX = 3), BW = 6,
//      MBL = 512, L = 300, Es/N0 = 10, 12, 14 dB, no window.  Reference:
//      BER = 2/3 * Q(sqrt(2 Es/N0) * sin(pi/8)), accurate at these SNRs.
//   E. smallest builds: MBL = 8 (four RAM slots) and MBL = 64, BW = 6,
//      full-length bursts at Es/N0 = 30 dB, 12 bursts each.
//
// Checks:
//   * every lane runs all its bursts and gives one estimate per burst;
//   * at 6 bits and above the BER stays within a factor of 1.6 of the
//     reference at every point, and the bin is right in at least 95 % of
//     the bursts at 8 dB and above;
//   * 7 bits gains little over 6 (less than a factor of 1.5 at 8 and
//     10 dB), while 4 bits loses clearly (more than 1.5 times the 6-bit BER
//     at 10 dB) and 5 bits lies between;
//   * MBL = 256 and 512 differ by less than a factor of 1.4 for L = 150,
//     and both stay within a factor of 2 of the reference;
//   * at 3 and 4 dB each window lowers the BER against no window, and the
//     1.5 % window lowers it against the 6 % window;
//   * at 5 dB the windows matter little (all within a factor of 1.5);
//   * 8PSK stays within a factor of 1.7 of its reference at 12 and 14 dB,
//     with the right bin in at least 95 % of the bursts;
//   * part E decodes without a bit error and with the right bin in every
//     burst;
//   * in every lane each estimate arrives exactly
//     2N + 2*log2(N) + 2*LOG2M_MAX + 15 cycles after its burst started.
// The noise is random, so the BER figures scatter by a few percent between
// seeds; the bounds leave room for that.
module tb_workloads;
  import sync_pkg::*;

  localparam int NBA = 600;     // bursts per point, parts A and B
  localparam int NBC = 400;     // bursts per point, part C

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Q function through erfc (Abramowitz and Stegun 7.1.26)
  function automatic real qfunc(input real x);
    real z, t, e;
    z = x / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    e = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741
        + t * (-1.453152027 + t * 1.061405429)))) * $exp(-z * z);
    return 0.5 * e;
  endfunction

  function automatic real ref_ber(input int snr10);
    return qfunc($sqrt(10.0 ** (real'(snr10) / 100.0)));
  endfunction

  // part A lanes: runs 0..2 are Es/N0 = 6, 8, 10 dB at L = 300
  localparam int NA = 3;
  localparam int A_L   [NA] = '{300, 300, 300};
  localparam int A_SNR [NA] = '{60, 80, 100};
  localparam int A_WU  [NA] = '{0, 0, 0};
  localparam int A_NB  [NA] = '{NBA, NBA, NBA};

  // the 6-bit, MBL = 512 lane also runs part B: runs 3..5 at L = 150
  localparam int N6 = 6;
  localparam int S6_L   [N6] = '{300, 300, 300, 150, 150, 150};
  localparam int S6_SNR [N6] = '{60, 80, 100, 60, 80, 100};
  localparam int S6_WU  [N6] = '{0, 0, 0, 0, 0, 0};
  localparam int S6_NB  [N6] = '{NBA, NBA, NBA, NBA, NBA, NBA};

  // the MBL = 256 lane: runs 0..2 part B, then part C as
  // 3 + 4*s + w with s = 3/4/5 dB and w = none, 30, 60, 120 bins
  localparam int NM = 15;
  localparam int M_L   [NM] = '{150, 150, 150, 150, 150, 150, 150, 150,
                                150, 150, 150, 150, 150, 150, 150};
  localparam int M_SNR [NM] = '{60, 80, 100, 30, 30, 30, 30, 40, 40, 40, 40,
                                50, 50, 50, 50};
  localparam int M_WU  [NM] = '{0, 0, 0, 0, 30, 60, 120, 0, 30, 60, 120,
                                0, 30, 60, 120};
  localparam int M_NB  [NM] = '{NBA, NBA, NBA, NBC, NBC, NBC, NBC, NBC, NBC,
                                NBC, NBC, NBC, NBC, NBC, NBC};

  // part D: 8PSK at Es/N0 = 10, 12, 14 dB
  localparam int ND = 3;
  localparam int NBD = 300;
  localparam int D_L   [ND] = '{300, 300, 300};
  localparam int D_SNR [ND] = '{100, 120, 140};
  localparam int D_WU  [ND] = '{0, 0, 0};
  localparam int D_NB  [ND] = '{NBD, NBD, NBD};

  int e8 [ND], b8 [ND], k8 [ND], c8 [ND];
  int e4 [NA], b4 [NA], k4 [NA], c4 [NA];
  int e5 [NA], b5 [NA], k5 [NA], c5 [NA];
  int e7 [NA], b7 [NA], k7 [NA], c7 [NA];
  int e6 [N6], b6 [N6], k6 [N6], c6 [N6];
  int em [NM], bm [NM], km [NM], cm [NM];
  logic d4, d5, d6, d7, dm, d8;
  int   l4, l5, l6, l7, lm, l8;

  // part E: the smallest builds, nearly noise free
  localparam int NE = 1;
  localparam int NBE = 12;
  localparam int E1_L [NE] = '{8};
  localparam int E2_L [NE] = '{64};
  localparam int E_SNR [NE] = '{300};
  localparam int E_WU  [NE] = '{0};
  localparam int E_NB  [NE] = '{NBE};
  int e_e [2][NE], b_e [2][NE], k_e [2][NE], c_e [2][NE], l_e [2];
  logic d_e [2];

  wl_lane #(.BW(6), .MBL(8), .NKNOWN(2), .NR(NE), .RUN_L(E1_L), .RUN_SNR10(E_SNR),
            .RUN_WU(E_WU), .RUN_NB(E_NB))
    lane_mbl8 (.clk, .rst_n, .lat_err(l_e[0]), .err(e_e[0]), .nbits(b_e[0]), .kok(k_e[0]),
               .kcnt(c_e[0]), .done(d_e[0]));
  wl_lane #(.BW(6), .MBL(64), .NR(NE), .RUN_L(E2_L), .RUN_SNR10(E_SNR),
            .RUN_WU(E_WU), .RUN_NB(E_NB))
    lane_mbl64 (.clk, .rst_n, .lat_err(l_e[1]), .err(e_e[1]), .nbits(b_e[1]), .kok(k_e[1]),
                .kcnt(c_e[1]), .done(d_e[1]));

  wl_lane #(.BW(4), .MBL(512), .NR(NA), .RUN_L(A_L), .RUN_SNR10(A_SNR),
            .RUN_WU(A_WU), .RUN_NB(A_NB))
    lane_n4 (.clk, .rst_n, .lat_err(l4), .err(e4), .nbits(b4), .kok(k4), .kcnt(c4), .done(d4));
  wl_lane #(.BW(5), .MBL(512), .NR(NA), .RUN_L(A_L), .RUN_SNR10(A_SNR),
            .RUN_WU(A_WU), .RUN_NB(A_NB))
    lane_n5 (.clk, .rst_n, .lat_err(l5), .err(e5), .nbits(b5), .kok(k5), .kcnt(c5), .done(d5));
  wl_lane #(.BW(6), .MBL(512), .NR(N6), .RUN_L(S6_L), .RUN_SNR10(S6_SNR),
            .RUN_WU(S6_WU), .RUN_NB(S6_NB))
    lane_n6 (.clk, .rst_n, .lat_err(l6), .err(e6), .nbits(b6), .kok(k6), .kcnt(c6), .done(d6));
  wl_lane #(.BW(7), .MBL(512), .NR(NA), .RUN_L(A_L), .RUN_SNR10(A_SNR),
            .RUN_WU(A_WU), .RUN_NB(A_NB))
    lane_n7 (.clk, .rst_n, .lat_err(l7), .err(e7), .nbits(b7), .kok(k7), .kcnt(c7), .done(d7));
  wl_lane #(.BW(6), .MBL(256), .NR(NM), .RUN_L(M_L), .RUN_SNR10(M_SNR),
            .RUN_WU(M_WU), .RUN_NB(M_NB))
    lane_m256 (.clk, .rst_n, .lat_err(lm), .err(em), .nbits(bm), .kok(km), .kcnt(cm), .done(dm));

  wl_lane #(.BW(6), .MBL(512), .LOG2M_MAX(3), .LOG2M(3), .NR(ND), .RUN_L(D_L),
            .RUN_SNR10(D_SNR), .RUN_WU(D_WU), .RUN_NB(D_NB))
    lane_8psk (.clk, .rst_n, .lat_err(l8), .err(e8), .nbits(b8), .kok(k8), .kcnt(c8), .done(d8));

  function automatic real ref_ber8(input int snr10);
    return 2.0 / 3.0 * qfunc($sqrt(2.0 * (10.0 ** (real'(snr10) / 100.0))) * $sin(PI / 8.0));
  endfunction

  function automatic real ber(input int e, input int b);
    return (b > 0) ? real'(e) / real'(b) : 1.0;
  endfunction

  initial begin
    repeat ((2 * NA * NBA + 2 * NBA + 12 * NBC + 40) * 1024) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r4, r5, r6, r7, rr, m2, m5, w0, w1, w2, w3, lo, hi;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (d4 && d5 && d6 && d7 && dm && d8 && d_e[0] && d_e[1]);

    check(l4 == 0 && l5 == 0 && l6 == 0 && l7 == 0 && lm == 0 && l8 == 0,
          "estimate latency differs from 2N + 2 log2 N + 2 LOG2M_MAX + 15");

    $display("A: input width, MBL = 512, L = 300 (BER, then bursts with the right bin)");
    for (int p = 0; p < NA; p++) begin
      r4 = ber(e4[p], b4[p]); r5 = ber(e5[p], b5[p]);
      r6 = ber(e6[p], b6[p]); r7 = ber(e7[p], b7[p]);
      rr = ref_ber(A_SNR[p]);
      $display("  Es/N0 %0d dB: ref %.2e  n=4 %.2e  n=5 %.2e  n=6 %.2e  n=7 %.2e   bins %0d %0d %0d %0d of %0d",
               A_SNR[p] / 10, rr, r4, r5, r6, r7, k4[p], k5[p], k6[p], k7[p], NBA);
      check(c4[p] == NBA && c5[p] == NBA && c6[p] == NBA && c7[p] == NBA, "A: estimate count");
      check(r6 < 1.6 * rr, $sformatf("A: 6-bit BER %.2e too far from reference at point %0d", r6, p));
      check(r7 < 1.6 * rr, $sformatf("A: 7-bit BER %.2e too far from reference at point %0d", r7, p));
      if (p > 0) begin
        check(k6[p] * 100 >= NBA * 95 && k7[p] * 100 >= NBA * 95, "A: wrong frequency bins");
        check(r6 < 1.5 * r7, $sformatf("A: 6 bits lose too much against 7 at point %0d", p));
      end
    end
    r4 = ber(e4[NA-1], b4[NA-1]); r5 = ber(e5[NA-1], b5[NA-1]);
    r6 = ber(e6[NA-1], b6[NA-1]);
    check(r4 > 1.5 * r6, "A: 4 bits should lose clearly against 6 bits at 10 dB");
    check(r5 < r4 && r5 * 1.05 > r6, "A: 5 bits should lie between 4 and 6 bits at 10 dB");

    $display("B: maximum burst length, BW = 6, L = 150");
    for (int p = 0; p < 3; p++) begin
      m2 = ber(em[p], bm[p]);
      m5 = ber(e6[3+p], b6[3+p]);
      rr = ref_ber(S6_SNR[3+p]);
      $display("  Es/N0 %0d dB: ref %.2e  MBL=256 %.2e  MBL=512 %.2e   bins %0d %0d of %0d",
               S6_SNR[3+p] / 10, rr, m2, m5, km[p], k6[3+p], NBA);
      check(cm[p] == NBA && c6[3+p] == NBA, "B: estimate count");
      check(m2 < 1.4 * m5 && m5 < 1.4 * m2, $sformatf("B: MBL 256 and 512 differ at point %0d", p));
      check(m2 < 2.0 * rr && m5 < 2.0 * rr, $sformatf("B: BER too far from reference at point %0d", p));
    end

    $display("C: window, MBL = 256, BW = 6, L = 150");
    for (int s = 0; s < 3; s++) begin
      w0 = ber(em[3+4*s], bm[3+4*s]);
      w1 = ber(em[4+4*s], bm[4+4*s]);
      w2 = ber(em[5+4*s], bm[5+4*s]);
      w3 = ber(em[6+4*s], bm[6+4*s]);
      rr = ref_ber(M_SNR[3+4*s]);
      $display("  Es/N0 %0d dB: ref %.2e  none %.2e  w_u=30 %.2e  w_u=60 %.2e  w_u=120 %.2e   bins %0d %0d %0d %0d of %0d",
               M_SNR[3+4*s] / 10, rr, w0, w1, w2, w3,
               km[3+4*s], km[4+4*s], km[5+4*s], km[6+4*s], NBC);
      for (int w = 0; w < 4; w++) check(cm[3+4*s+w] == NBC, "C: estimate count");
      if (s < 2) begin
        check(w1 < w0 && w2 < w0 && w3 < w0, $sformatf("C: a window does not help at %0d dB", 3 + s));
        check(w1 < w3, $sformatf("C: 1.5 %% window not better than 6 %% at %0d dB", 3 + s));
      end else begin
        lo = w0; hi = w0;
        if (w1 < lo) lo = w1;
        if (w2 < lo) lo = w2;
        if (w3 < lo) lo = w3;
        if (w1 > hi) hi = w1;
        if (w2 > hi) hi = w2;
        if (w3 > hi) hi = w3;
        check(hi < 1.5 * lo, "C: windows should matter little at 5 dB");
      end
    end

    $display("D: 8PSK, LOG2M_MAX = 3, MBL = 512, L = 300");
    for (int p = 0; p < ND; p++) begin
      r6 = ber(e8[p], b8[p]);
      rr = ref_ber8(D_SNR[p]);
      $display("  Es/N0 %0d dB: ref %.2e  8PSK %.2e   bins %0d of %0d",
               D_SNR[p] / 10, rr, r6, k8[p], NBD);
      check(c8[p] == NBD, "D: estimate count");
      if (p > 0) begin
        check(r6 < 1.7 * rr, $sformatf("D: 8PSK BER %.2e too far from reference at point %0d", r6, p));
        check(k8[p] * 100 >= NBD * 95, "D: wrong frequency bins");
      end
    end

    $display("E: MBL = 8 and 64 with full-length bursts, Es/N0 = 30 dB");
    for (int i = 0; i < 2; i++) begin
      $display("  MBL=%0d: %0d bit errors in %0d bits, right bin in %0d of %0d, latency errors %0d",
               (i == 0) ? 8 : 64, e_e[i][0], b_e[i][0], k_e[i][0], NBE, l_e[i]);
      check(c_e[i][0] == NBE && b_e[i][0] > 0, "E: estimate count");
      check(e_e[i][0] == 0, $sformatf("E: bit errors in build %0d", i));
      check(k_e[i][0] == NBE, $sformatf("E: wrong bin in build %0d", i));
      check(l_e[i] == 0, $sformatf("E: estimate latency in build %0d", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

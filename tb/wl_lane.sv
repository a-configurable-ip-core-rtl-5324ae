// wl_lane: one synchronization core with its own noisy M-PSK burst source
// and bit-error counter, used by tb_workloads to run several core builds
// side by side.
//
// The lane instantiates sync_core with the given BW, MBL and LOG2M_MAX and works
// through NR runs one after another.  Run r sends RUN_NB[r] bursts of
// RUN_L[r] random Gray-coded M-PSK symbols, M = 2^LOG2M (QPSK by default),
// at the points (2q+1)*pi/M, each
// with a carrier offset of FO of the symbol rate, a phase offset PHI and
// complex white Gaussian noise at Es/N0 = RUN_SNR10[r]/10 dB.  The signal
// has an rms amplitude of 12 * 2^(BW-6) LSB, as an automatic gain control
// would set it, and is rounded and clipped to BW bits.  The search window is
// bins 0..RUN_WU[r] and N-RUN_WU[r]..N-1, or the whole spectrum when
// RUN_WU[r] is 0.  Each burst starts on the first cycle of a frame.
//
// The corrected bursts keep the M-fold ambiguity of the estimator.  As a
// back end would, the lane resolves it from the first NKNOWN symbols of
// each burst, which it treats as known: it correlates them with the output
// and rounds the angle of that correlation to the nearest of the M
// possible rotations, so the phase itself still comes from the core alone.
// It then decides the other symbols and counts bit errors.  It also counts
// the estimates whose bin lies within one bin of M*FO*N, and the estimates
// that do not arrive exactly 2N + 2*log2(N) + 2*LOG2M_MAX + 15 cycles after
// the first sample of their burst.
//
// Results come out per run on err/nbits/kok/kcnt; done rises after the last
// run.  The noise source, the back end and the result ports are test
// scaffolding.
module wl_lane #(
  parameter int  BW  = 6,
  parameter int  MBL = 512,
  parameter int  LOG2M_MAX = 2,   // build of the core
  parameter int  LOG2M = 2,       // modulation sent: M = 2^LOG2M
  parameter int  NR  = 1,
  parameter int  NKNOWN = 8,      // leading symbols the back end knows
  parameter int  RUN_L     [NR] = '{300},
  parameter int  RUN_SNR10 [NR] = '{80},
  parameter int  RUN_WU    [NR] = '{0},
  parameter int  RUN_NB    [NR] = '{10},
  parameter real FO  = 0.012,
  parameter real PHI = 3.14159265358979 / 6.0
) (
  input  logic clk,
  input  logic rst_n,
  output int   err   [NR],
  output int   nbits [NR],
  output int   kok   [NR],
  output int   kcnt  [NR],
  output int   lat_err,           // estimates not EST_LAT cycles after their burst
  output logic done
);
  import sync_pkg::*;

  localparam int N  = 2 * MBL;
  localparam int LN = $clog2(N);
  localparam int LW = $clog2(MBL + 1);
  localparam int AW = LN + LOG2M_MAX;
  localparam int MLW = $clog2(LOG2M_MAX + 1);
  localparam int M  = 1 << LOG2M;
  localparam real AMP = 12.0 * (2.0 ** (BW - 6));
  localparam int EST_LAT = 2 * N + 2 * LN + 2 * LOG2M_MAX + 15;

  logic in_valid, in_ready;
  logic signed [BW-1:0] in_i, in_q;
  logic [LW-1:0] cfg_len;
  logic [MLW-1:0] cfg_log2m;
  logic [LN-1:0] cfg_wu, cfg_wl;
  logic est_valid;
  logic [LN-1:0] est_k;
  logic [AW-1:0] est_phi;
  logic out_valid, out_first, out_last;
  logic signed [BW:0] out_i, out_q;

  sync_core #(.BW(BW), .MBL(MBL), .LOG2M_MAX(LOG2M_MAX)) dut (.*);

  function automatic real atan2(input real y, input real x);
    if (x > 0.0) return $atan(y / x);
    if (x < 0.0) return (y >= 0.0) ? $atan(y / x) + PI : $atan(y / x) - PI;
    return (y >= 0.0) ? PI / 2.0 : -PI / 2.0;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    u2 = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic int qround(input real v);
    int r;
    r = $rtoi((v >= 0.0) ? v + 0.5 : v - 0.5);
    if (r > (1 << (BW - 1)) - 1) r = (1 << (BW - 1)) - 1;
    if (r < -(1 << (BW - 1))) r = -(1 << (BW - 1));
    return r;
  endfunction

  localparam real STEP = 2.0 * PI / real'(M);

  // symbol q sits at (2q+1)*pi/M, Gray-coded
  function automatic real sym_ang(input int q);
    return PI / real'(M) + STEP * real'(q);
  endfunction

  int  run_id = 0;
  int  kexp;
  int  sym_q [$];
  int  done_bursts = 0;

  // frequency estimates and their latency
  int cyc = 0;
  int start_q [$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && dut.fpos == '0) start_q.push_back(cyc);
    if (rst_n && est_valid) begin
      int d;
      if (start_q.size() == 0 || cyc - start_q.pop_front() != EST_LAT) lat_err++;
      d = int'(est_k) - kexp;
      if (d > N / 2) d -= N;
      if (d < -N / 2) d += N;
      kcnt[run_id]++;
      if (d >= -1 && d <= 1) kok[run_id]++;
    end
  end

  // corrected bursts
  int  ol = 0;
  real ua [MBL];
  int  ss [MBL];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      ss[ol] = sym_q.pop_front();
      ua[ol] = atan2(real'(out_q), real'(out_i));
      ol++;
      if (out_last) begin
        real ci, cq, rot, a;
        int q, dq;
        ci = 0.0; cq = 0.0;
        for (int l = 0; l < NKNOWN; l++) begin
          ci += $cos(ua[l] - sym_ang(ss[l]));
          cq += $sin(ua[l] - sym_ang(ss[l]));
        end
        // the M candidate rotations are -pi/M + q*2*pi/M
        rot = atan2(cq, ci);
        rot = STEP * $floor((rot + PI / real'(M)) / STEP + 0.5) - PI / real'(M);
        for (int l = NKNOWN; l < ol; l++) begin
          a = ua[l] - rot;
          q = $rtoi($floor((a - PI / real'(M)) / STEP + 0.5));
          q = ((q % M) + M) % M;
          dq = (q ^ (q >> 1)) ^ (ss[l] ^ (ss[l] >> 1));
          err[run_id] += $countones(dq);
          nbits[run_id] += LOG2M;
        end
        ol = 0;
        done_bursts++;
      end
    end
  end

  task automatic send_burst(input int len, input real sigma, input int wu);
    real a;
    int s;
    @(posedge clk);
    #1;
    while (!in_ready || dut.fpos != '0) begin
      @(posedge clk);
      #1;
    end
    for (int l = 0; l < len; l++) begin
      if (l > 0) begin
        @(posedge clk);
        #1;
      end
      s = int'($urandom_range(M - 1));
      sym_q.push_back(s);
      a = sym_ang(s) + 2.0 * PI * FO * real'(l) + PHI;
      in_valid  <= 1'b1;
      in_i      <= BW'(qround(AMP * $cos(a) + sigma * gauss()));
      in_q      <= BW'(qround(AMP * $sin(a) + sigma * gauss()));
      cfg_len   <= LW'(len);
      cfg_log2m <= MLW'(LOG2M);
      cfg_wu    <= LN'((wu > 0) ? wu : N / 2 - 1);
      cfg_wl    <= LN'((wu > 0) ? N - wu : N / 2);
    end
    @(posedge clk);
    #1;
    in_valid <= 1'b0;
  endtask

  initial begin
    real sigma;
    int target;
    done = 1'b0;
    in_valid = 1'b0; in_i = '0; in_q = '0;
    cfg_len = '0; cfg_log2m = '0; cfg_wu = '0; cfg_wl = '0;
    for (int r = 0; r < NR; r++) begin
      err[r] = 0; nbits[r] = 0; kok[r] = 0; kcnt[r] = 0;
    end
    lat_err = 0;
    kexp = $rtoi($floor(real'(M) * FO * real'(N) + 0.5));
    @(posedge rst_n);
    for (int r = 0; r < NR; r++) begin
      run_id = r;
      // Es/N0 = AMP^2 / (2 sigma^2)
      sigma = AMP / $sqrt(2.0 * (10.0 ** (real'(RUN_SNR10[r]) / 100.0)));
      target = done_bursts + RUN_NB[r];
      for (int b = 0; b < RUN_NB[r]; b++) send_burst(RUN_L[r], sigma, RUN_WU[r]);
      while (done_bursts < target) @(posedge clk);
    end
    done = 1'b1;
  end
endmodule

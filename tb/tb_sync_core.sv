// tb_sync_core: end-to-end test of the synchronization core at its default
// configuration (6-bit samples, MBL = 512, N = 1024 FFT points, M = 2 or 4).
//
// A schedule of bursts is generated in floating point: random BPSK/QPSK
// symbols, rotated by a frequency offset f_o and phase offset Phi, with
// +-1 LSB of uniform noise, quantised to 6 bits.  For each burst the test
// checks
//   * the frequency estimate k_fw against round(M*f_o*N) (taken modulo N),
//     or, for a burst whose offset lies outside its window, that k_fw is
//     inside the window;
//   * the phase estimate against Phi + arg(s^M)/M modulo 2*pi/M;
//   * every corrected sample: its rotation against the sent symbol must equal,
//     modulo 2*pi/M, the residual expected from the estimates (Phi - Phi_hat
//     plus the drift of an offset that lies between two bins), the M-fold
//     ambiguity must not change inside a burst, and its magnitude must match;
//   * the frame rate (back-to-back bursts every N cycles), the fixed
//     latency from a burst's first sample to its estimate, and the three
//     cycles from the estimate to the first corrected sample.
// Every mechanism of the core is counted and must occur: QPSK and BPSK
// bursts, positive and negative offsets, full and short bursts (zero
// padding), windowed searches that keep and that exclude the true peak, an
// idle frame, a gap inside a burst, and output of one burst while later
// bursts are being received.
module tb_sync_core;
  import sync_pkg::*;

  localparam int BW  = DEF_BW;
  localparam int MBL = DEF_MBL;
  localparam int N   = 2 * MBL;
  localparam int LN  = $clog2(N);
  localparam int LW  = $clog2(MBL + 1);
  localparam int AW  = LN + DEF_LOG2M_MAX;
  localparam int NB  = 7;             // bursts in the schedule
  localparam real AMP = 24.0;
  localparam real PTOL = 0.15;         // rad, per-sample phase tolerance
  localparam int EST_LAT = 2 * N + LN + AW + 17;  // first sample -> est_valid

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  logic signed [BW-1:0] in_i, in_q;
  logic [LW-1:0] cfg_len;
  logic [1:0] cfg_log2m;
  logic [LN-1:0] cfg_wu, cfg_wl;
  logic est_valid;
  logic [LN-1:0] est_k;
  logic [AW-1:0] est_phi;
  logic out_valid, out_first, out_last;
  logic signed [BW:0] out_i, out_q;

  sync_core dut (.*);

  // ------------------------------------------------------------ schedule
  typedef struct {
    int  len;
    int  log2m;
    real fo;          // frequency offset, fraction of the symbol rate
    real phi;
    int  wu, wl;
    bit  windowed_out; // true offset deliberately outside the window
    int  gap_at;      // sample index sent without in_valid (-1: none)
    int  idle_before; // idle frames before this burst
  } burst_t;

  burst_t bs [NB];
  int     sym [NB][MBL];
  int     ri  [NB][MBL];
  int     rq  [NB][MBL];
  int     start_cyc [NB];

  int checks = 0, failures = 0;
  int n_qpsk = 0, n_bpsk = 0, n_neg = 0, n_pos = 0, n_full = 0, n_short = 0;
  int n_win_keep = 0, n_win_excl = 0, n_idle = 0, n_gap = 0, n_overlap = 0;

  function automatic real wrap(input real a);   // to (-pi, pi]
    real r = a;
    while (r > PI) r -= 2.0 * PI;
    while (r <= -PI) r += 2.0 * PI;
    return r;
  endfunction

  function automatic real wrapm(input real a, input int m);  // to (-pi/m, pi/m]
    real p = 2.0 * PI / real'(m);
    real r = a;
    while (r > p / 2.0) r -= p;
    while (r <= -p / 2.0) r += p;
    return r;
  endfunction

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real atan2(input real y, input real x);
    if (x > 0.0) return $atan(y / x);
    if (x < 0.0) return (y >= 0.0) ? $atan(y / x) + PI : $atan(y / x) - PI;
    return (y >= 0.0) ? PI / 2.0 : -PI / 2.0;
  endfunction

  function automatic real sym_phase(input int m, input int q);
    // BPSK: 0, pi.  QPSK: pi/4 + q*pi/2.
    return (m == 2) ? PI * real'(q) : PI / 4.0 + PI / 2.0 * real'(q);
  endfunction

  // M*f_o*N - k_fw: distance of the true offset from the chosen bin, in bins
  function automatic real delta_bins(input int b, input int k);
    real d = real'(1 << bs[b].log2m) * bs[b].fo * real'(N) - real'(k);
    while (d > real'(N / 2)) d -= real'(N);
    while (d < -real'(N / 2)) d += real'(N);
    return d;
  endfunction

  // rotation expected on corrected sample l (modulo 2*pi/M)
  function automatic real rho_exp(input int b, input int l);
    int m = 1 << bs[b].log2m;
    return bs[b].phi + 2.0 * PI * delta_bins(b, k_hat[b]) * real'(l) / real'(m * N) - phi_hat[b];
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int qround(input real v);
    int r = $rtoi((v >= 0.0) ? v + 0.5 : v - 0.5);
    if (r > (1 << (BW - 1)) - 1) r = (1 << (BW - 1)) - 1;
    if (r < -(1 << (BW - 1))) r = -(1 << (BW - 1));
    return r;
  endfunction

  function automatic int win_bins(input real w, input int m);
    return $rtoi($floor(w * real'(m) * real'(N)));
  endfunction

  initial begin
    // len, log2m, fo, phi, wu, wl, windowed_out, gap_at, idle_before
    bs[0] = '{MBL, 2,  37.0 / (4.0 * N),  0.3, N/2-1, N/2, 1'b0, -1, 0};
    bs[1] = '{300, 1, -50.0 / (2.0 * N), -1.0, N/2-1, N/2, 1'b0, -1, 0};
    bs[2] = '{150, 2,  0.012,             2.2, win_bins(0.06, 4),  N - win_bins(0.06, 4),  1'b0, -1, 0};
    bs[3] = '{200, 2,  0.012,            -2.5, win_bins(0.015, 4), N - win_bins(0.015, 4), 1'b0, -1, 1};
    bs[4] = '{256, 2, -0.06,              1.1, 100, N - 100, 1'b1, -1, 0};
    bs[5] = '{MBL, 1,  0.1,               0.7, N/2-1, N/2, 1'b0, -1, 0};
    bs[6] = '{400, 2, -120.0 / (4.0 * N), -0.4, N/2-1, N/2, 1'b0, 123, 0};
    for (int b = 0; b < NB; b++) begin
      int m;
      m = 1 << bs[b].log2m;
      for (int l = 0; l < bs[b].len; l++) begin
        real a;
        sym[b][l] = int'($urandom_range(m - 1));
        a = sym_phase(m, sym[b][l]) + 2.0 * PI * bs[b].fo * real'(l) + bs[b].phi;
        ri[b][l] = qround(AMP * $cos(a) + (real'($urandom_range(200)) / 100.0 - 1.0));
        rq[b][l] = qround(AMP * $sin(a) + (real'($urandom_range(200)) / 100.0 - 1.0));
        if (l == bs[b].gap_at) begin ri[b][l] = 0; rq[b][l] = 0; end
      end
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat ((NB + 8) * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ stimulus
  initial begin
    in_valid = 1'b0; in_i = '0; in_q = '0;
    cfg_len = '0; cfg_log2m = '0; cfg_wu = '0; cfg_wl = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NB; b++) begin
      // wait for the frame start, skipping idle frames as scheduled
      for (int f = 0; f <= bs[b].idle_before; f++) begin
        @(posedge clk);
        #1;
        while (!in_ready || dut.fpos != '0) begin
          @(posedge clk);
          #1;
        end
        if (f < bs[b].idle_before) n_idle++;
      end
      // at the frame start: present the first sample and the configuration
      start_cyc[b] = cyc;
      for (int l = 0; l < bs[b].len; l++) begin
        if (l > 0) begin
          @(posedge clk);
          #1;
        end
        check(in_ready, $sformatf("burst %0d sample %0d not ready", b, l));
        in_valid  <= (l != bs[b].gap_at);
        in_i      <= BW'(ri[b][l]);
        in_q      <= BW'(rq[b][l]);
        cfg_len   <= LW'(bs[b].len);
        cfg_log2m <= 2'(bs[b].log2m);
        cfg_wu    <= LN'(bs[b].wu);
        cfg_wl    <= LN'(bs[b].wl);
        if (l == bs[b].gap_at) n_gap++;
      end
      @(posedge clk);
      in_valid <= 1'b0;
      #1;
      if (b > 0 && bs[b].idle_before == 0)
        check(start_cyc[b] - start_cyc[b-1] == N,
              $sformatf("burst %0d started %0d cycles after the previous one", b, start_cyc[b] - start_cyc[b-1]));
    end
  end

  // ------------------------------------------------------------ estimates
  int eb = 0;
  real phi_hat [NB];
  int  k_hat [NB];
  int  est_cyc [NB];
  always @(posedge clk) begin
    if (rst_n && est_valid) begin
      int m, kexp, k;
      real phexp, ph;
      m = 1 << bs[eb].log2m;
      k = int'(est_k);
      kexp = $rtoi($floor(real'(m) * bs[eb].fo * real'(N) + 0.5));
      kexp = (kexp % N + N) % N;
      check(cyc - start_cyc[eb] == EST_LAT,
            $sformatf("burst %0d estimate latency %0d, expected %0d", eb, cyc - start_cyc[eb], EST_LAT));
      if (bs[eb].windowed_out) begin
        check(k <= bs[eb].wu || k >= bs[eb].wl, $sformatf("burst %0d k=%0d outside window", eb, k));
        check(!(kexp <= bs[eb].wu || kexp >= bs[eb].wl), "windowed-out burst has offset inside window");
        n_win_excl++;
      end else begin
        check(k == kexp, $sformatf("burst %0d k=%0d expected %0d", eb, k, kexp));
        if (bs[eb].wu != N/2-1) n_win_keep++;
        if (kexp >= N/2) n_neg++; else n_pos++;
        // s^M has phase pi for the QPSK points used, 0 for BPSK; an offset
        // of delta bins off the bin centre adds pi*delta*(L-1)/N to arg X
        phexp = bs[eb].phi + ((m == 4) ? PI / 4.0 : 0.0)
              + PI * delta_bins(eb, k) * real'(bs[eb].len - 1) / real'(N) / real'(m);
        ph = 2.0 * PI * real'(est_phi) / real'(1 << AW);
        check(fabs(wrapm(ph - phexp, m)) < 0.06,
              $sformatf("burst %0d phi %f expected %f mod 2pi/%0d", eb, ph, phexp, m));
      end
      est_cyc[eb] = cyc;
      phi_hat[eb] = 2.0 * PI * real'(est_phi) / real'(1 << AW);
      k_hat[eb] = k;
      if (m == 4) n_qpsk++; else n_bpsk++;
      if (bs[eb].len == MBL) n_full++; else n_short++;
      eb++;
    end
  end

  // ------------------------------------------------------------ corrected samples
  int ob = 0, ol = 0;
  real rho0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int m;
      real rho, mag, magr;
      if (in_valid && in_ready) n_overlap++;
      m = 1 << bs[ob].log2m;
      check((ol == 0) == out_first, "out_first misplaced");
      if (ol == 0) check(cyc - est_cyc[ob] == 3, $sformatf("burst %0d output %0d cycles after its estimate", ob, cyc - est_cyc[ob]));
      check((ol == bs[ob].len - 1) == out_last, "out_last misplaced");
      if (!bs[ob].windowed_out && ol != bs[ob].gap_at) begin
        // rotation left after correction, minus the expected residual
        rho = atan2(real'(out_q), real'(out_i)) - sym_phase(m, sym[ob][ol]) - rho_exp(ob, ol);
        check(fabs(wrapm(rho, m)) < PTOL,
              $sformatf("burst %0d sample %0d residual rotation %f", ob, ol, wrapm(rho, m)));
        // the M-fold ambiguity must be the same for the whole burst
        if (ol == 0) rho0 = rho;
        else check(fabs(wrap(rho - rho0)) < 2.0 * PTOL,
                   $sformatf("burst %0d sample %0d ambiguity changed by %f", ob, ol, wrap(rho - rho0)));
        mag  = $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
        magr = $sqrt(real'(ri[ob][ol]) * real'(ri[ob][ol]) + real'(rq[ob][ol]) * real'(rq[ob][ol]));
        check(fabs(mag - magr) < 1.5, $sformatf("burst %0d sample %0d magnitude %f vs %f", ob, ol, mag, magr));
      end
      if (ol == bs[ob].gap_at)
        check(out_i == '0 && out_q == '0, "gap sample not zero");
      ol++;
      if (ol == bs[ob].len) begin
        ol = 0;
        ob++;
        if (ob == NB) begin
          check(eb == NB, "estimate count");
          check(n_qpsk > 0, "no QPSK burst");
          check(n_bpsk > 0, "no BPSK burst");
          check(n_pos > 0, "no positive offset");
          check(n_neg > 0, "no negative offset");
          check(n_full > 0, "no full-length burst");
          check(n_short > 0, "no short (zero-padded) burst");
          check(n_win_keep > 0, "no window containing the offset");
          check(n_win_excl > 0, "no window excluding the offset");
          check(n_idle > 0, "no idle frame");
          check(n_gap > 0, "no gap inside a burst");
          check(n_overlap > 0, "output never overlapped input");
          $display("bursts: qpsk=%0d bpsk=%0d pos=%0d neg=%0d full=%0d short=%0d win_keep=%0d win_excl=%0d idle=%0d gap=%0d overlap_cycles=%0d",
                   n_qpsk, n_bpsk, n_pos, n_neg, n_full, n_short, n_win_keep, n_win_excl, n_idle, n_gap, n_overlap);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule

// tb_spectral_analysis: self-checking testbench of the windowed peak search
// and phase estimate.
//
// Streams 30 back-to-back frames of N = 1024 bins of 19 bits (the module's
// default size) in bit-reversed order, as the FFT delivers them.  Each
// frame has random small bins and one strong peak, up to 98 % of full
// scale, at a random bin; a random window (wu, wl), a random modulation
// index M in {1, 2, 4} and a random 4-bit tag.  In some frames the peak
// lies outside the window.
// A floating-point reference finds the windowed maximum of |X| (first
// arrival wins ties) and arg(X)/M; the block must return the same bin, the
// phase within 1.5 LSB of the 12-bit phase word, the frame's tag, and must
// answer AW+5 cycles after the last bin.
module tb_spectral_analysis;
  localparam int N  = 1024;      // the module's defaults
  localparam int LN = $clog2(N);
  localparam int XW = 19;
  localparam int AW = 12;
  localparam int TAGW = 4;       // wider than the default to check tags
  localparam int SC = 1 << (XW - 14);   // bin amplitude scale
  localparam int NF = 30;
  localparam int LAT = AW + 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bin_valid, bin_first, bin_last, est_valid;
  logic signed [XW-1:0] bin_re, bin_im;
  logic [LN-1:0] bin_idx, cfg_wu, cfg_wl, est_k;
  logic [1:0] cfg_log2m;
  logic [TAGW-1:0] cfg_tag, est_tag;
  logic [AW-1:0] est_phi;

  spectral_analysis #(.TAGW(TAGW)) dut (.*);

  int checks = 0, failures = 0;
  int exp_k [NF];
  real exp_a [NF];
  int exp_m [NF], exp_tag [NF], last_cyc [NF];
  int n_excl = 0;

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real atan2(input real y, input real x);
    if (x > 0.0) return $atan(y / x);
    if (x < 0.0) return (y >= 0.0) ? $atan(y / x) + PI : $atan(y / x) - PI;
    return (y >= 0.0) ? PI / 2.0 : -PI / 2.0;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat ((NF + 4) * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int ef = 0;
  always @(posedge clk) begin
    if (rst_n && est_valid) begin
      real ph, d, span;
      check(int'(est_k) == exp_k[ef], $sformatf("frame %0d k=%0d want %0d", ef, est_k, exp_k[ef]));
      check(int'(est_tag) == exp_tag[ef], "tag");
      check(cyc - last_cyc[ef] == LAT, $sformatf("latency %0d", cyc - last_cyc[ef]));
      ph   = 2.0 * PI * real'(est_phi) / real'(1 << AW);
      span = 2.0 * PI / real'(exp_m[ef]);
      d    = ph - exp_a[ef];
      while (d > span / 2.0) d -= span;
      while (d < -span / 2.0) d += span;
      check(fabs(d) <= 1.5 * 2.0 * PI / real'(1 << AW),
            $sformatf("frame %0d phi %f want %f", ef, ph, exp_a[ef]));
      ef++;
      if (ef == NF) begin
        check(n_excl > 0, "no frame with the peak outside the window");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    bin_valid = 0; bin_first = 0; bin_last = 0; bin_re = '0; bin_im = '0; bin_idx = '0;
    cfg_wu = '0; cfg_wl = '0; cfg_log2m = '0; cfg_tag = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      int re [N], im [N];
      int wu, wl, lm, pk, best_k;
      real best;
      bit have;
      wu = int'($urandom_range(N / 2 - 1));
      wl = N / 2 + int'($urandom_range(N / 2 - 1));
      if (f % 3 == 0) begin wu = N / 2 - 1; wl = N / 2; end
      lm = int'($urandom_range(2));
      pk = int'($urandom_range(N - 1));
      for (int k = 0; k < N; k++) begin
        re[k] = SC * (int'($urandom_range(2000)) - 1000);
        im[k] = SC * (int'($urandom_range(2000)) - 1000);
      end
      // the peak reaches up to 98 % of the bin range
      re[pk] = SC * (int'($urandom_range(8000)) - 4000);
      im[pk] = SC * ((re[pk] > 0 ? 1 : -1) * int'($urandom_range(4000)) + 4000);
      if (!(pk <= wu || pk >= wl)) n_excl++;
      // reference: windowed maximum in arrival (bit-reversed) order
      have = 0; best = 0.0; best_k = 0;
      for (int p = 0; p < N; p++) begin
        int k;
        real m2;
        k = 0;
        for (int b = 0; b < LN; b++) k |= ((p >> b) & 1) << (LN - 1 - b);
        m2 = real'(re[k]) * real'(re[k]) + real'(im[k]) * real'(im[k]);
        if ((k <= wu || k >= wl) && (!have || m2 > best)) begin
          have = 1; best = m2; best_k = k;
        end
      end
      exp_k[f] = best_k;
      exp_m[f] = 1 << lm;
      exp_a[f] = atan2(real'(im[best_k]), real'(re[best_k]));
      if (exp_a[f] < 0.0) exp_a[f] += 2.0 * PI;
      exp_a[f] = exp_a[f] / real'(exp_m[f]);
      exp_tag[f] = f % 16;
      for (int p = 0; p < N; p++) begin
        int k;
        k = 0;
        for (int b = 0; b < LN; b++) k |= ((p >> b) & 1) << (LN - 1 - b);
        bin_valid <= 1'b1;
        bin_first <= (p == 0);
        bin_last  <= (p == N - 1);
        bin_idx   <= LN'(k);
        bin_re    <= XW'(re[k]);
        bin_im    <= XW'(im[k]);
        cfg_wu    <= (p == 0) ? LN'(wu) : '0;
        cfg_wl    <= (p == 0) ? LN'(wl) : '0;
        cfg_log2m <= (p == 0) ? 2'(lm) : '0;
        cfg_tag   <= (p == 0) ? TAGW'(f % 16) : '0;
        @(posedge clk);
        if (p == N - 1) last_cyc[f] = cyc;
      end
    end
    bin_valid <= 1'b0;
  end
endmodule

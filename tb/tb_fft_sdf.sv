// tb_fft_sdf: self-checking testbench of the streaming FFT, at the module's
// default size (1024 points, 8-bit input, 12-bit twiddles).
//
// Streams three frames of random complex samples (the last one a pure tone)
// followed by a zero frame that pushes the final spectrum out.  Every output
// bin is compared with a direct DFT evaluated in floating point.  Each stage
// rounds its twiddle product to the input LSB and the word grows one bit per
// stage, so rounding noise from the early stages is summed by the later
// butterflies: about 9 LSB rms per component on random bins of about 3000.
// A bin may differ by TOL LSB plus REL of its magnitude (REL covers the
// twiddle magnitude, which is at most 1 - 2^-11 per stage and shows on the
// tone); the rms error over the random frames must stay below RMS_MAX.  The
// first bin must appear N-1+log2(N) cycles after the first sample and the
// bin labels must enumerate 0..N-1 once per frame.
module tb_fft_sdf;
  localparam int N   = 1024;    // the module's defaults
  localparam int IW  = 8;
  localparam int LN  = $clog2(N);
  localparam int OW  = IW + LN + 1;
  localparam int NF  = 3;
  localparam real TOL = 60.0;      // LSB, about 7 sigma of the rounding noise
  localparam real REL = 5.0e-3;    // twiddle magnitude loss, up to 2^-11 per stage
  localparam real RMS_MAX = 12.0;  // LSB, rounding noise over the random frames
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [IW-1:0] in_re, in_im;
  logic out_valid, out_first, out_last;
  logic signed [OW-1:0] out_re, out_im;
  logic [LN-1:0] out_idx;

  fft_sdf dut (.*);

  int checks = 0, failures = 0;
  int xr [NF][N];
  int xi [NF][N];
  bit seen [N];
  real cs [N], sn [N];         // cos and sin of -2*pi*i/N

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, first_in = -1, first_out = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in = cyc;
  end

  // Output checker
  int fr = 0, nb = 0;
  real max_err = -1.0e9;       // largest error minus its tolerance
  real se = 0.0;               // squared error over the random frames
  int  ne = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && fr < NF) begin
      real er, ei, tol;
      if (first_out < 0) first_out = cyc;
      if (nb == 0) begin
        check(out_first, "out_first missing");
        for (int k = 0; k < N; k++) seen[k] = 1'b0;
      end
      check(!seen[out_idx], "bin index repeated");
      seen[out_idx] = 1'b1;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        int t;
        t = (int'(out_idx) * n) % N;
        er += real'(xr[fr][n]) * cs[t] - real'(xi[fr][n]) * sn[t];
        ei += real'(xr[fr][n]) * sn[t] + real'(xi[fr][n]) * cs[t];
      end
      tol = TOL + REL * $sqrt(er * er + ei * ei);
      if (fr < NF - 1) begin
        se += (er - real'(out_re)) ** 2 + (ei - real'(out_im)) ** 2;
        ne += 2;
      end
      if (fabs(er - real'(out_re)) - tol > max_err) max_err = fabs(er - real'(out_re)) - tol;
      if (fabs(ei - real'(out_im)) - tol > max_err) max_err = fabs(ei - real'(out_im)) - tol;
      check(fabs(er - real'(out_re)) <= tol && fabs(ei - real'(out_im)) <= tol,
            $sformatf("frame %0d bin %0d got %0d,%0d want %f,%f", fr, out_idx, out_re, out_im, er, ei));
      nb++;
      if (nb == N) begin
        check(out_last, "out_last missing");
        nb = 0; fr++;
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      cs[i] = $cos(-2.0 * PI * real'(i) / real'(N));
      sn[i] = $sin(-2.0 * PI * real'(i) / real'(N));
    end
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        if (f == NF - 1) begin
          xr[f][n] = $rtoi(100.0 * $cos(2.0 * PI * 5.0 * n / N));
          xi[f][n] = $rtoi(100.0 * $sin(2.0 * PI * 5.0 * n / N));
        end else begin
          xr[f][n] = int'($urandom_range(255)) - 128;
          xi[f][n] = int'($urandom_range(255)) - 128;
        end
      end
    in_valid = 0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        in_valid <= 1'b1;
        in_re <= (f < NF) ? IW'(xr[f][n]) : '0;
        in_im <= (f < NF) ? IW'(xi[f][n]) : '0;
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (LN + 4) @(posedge clk);
    check(fr == NF, $sformatf("only %0d frames out", fr));
    check(first_out - first_in == N - 1 + LN,
          $sformatf("latency %0d, expected %0d", first_out - first_in, N - 1 + LN));
    $display("largest error against its tolerance: %f LSB, rms error %f LSB",
             max_err, $sqrt(se / real'(ne)));
    check($sqrt(se / real'(ne)) < RMS_MAX, "rms error too large");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

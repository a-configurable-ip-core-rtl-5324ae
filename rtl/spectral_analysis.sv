// spectral_analysis: windowed peak search over the FFT bins and phase estimate.
//
// For every frame of N bins this block finds k_fw, the bin of largest
// magnitude among the bins allowed by the window (k <= wu or k >= wl; wu =
// N/2-1, wl = N/2 admits every bin), and then evaluates the phase estimate
// Phi = arg(X(k_fw)) / M with a serial CORDIC.  Magnitudes are compared as
// |X|^2 = re^2 + im^2 (two multipliers); the search itself is a comparator
// and a running-maximum register, using the bin label delivered by the FFT.  Bins may arrive in any order; of equal maxima the first to arrive
// wins.  Dividing the angle by M is a right shift of the phase word, so Phi
// lies in [0, 2*pi/M): the M-fold ambiguity is left to the back end.
//
// Interface: bin_valid/bin_re/bin_im/bin_idx with bin_first and bin_last
// marking a frame; cfg_wu/cfg_wl/cfg_log2m/cfg_tag are sampled with
// bin_first.  est_valid pulses with est_k, est_phi (AW-bit phase word) and the
// frame's tag AW+5 cycles after bin_last.  Frames must be at least AW+5 bins
// long (always true for the core).  The window rule, |X|-based search and
// arg/M follow the design description; squared-magnitude comparison and tie rule are
// this implementation's choices.
module spectral_analysis #(
  parameter int N         = 1024,  // FFT size
  parameter int XW        = 19,    // bin width per component
  parameter int AW        = 12,    // phase word width of the estimate
  parameter int LOG2M_MAX = 2,
  parameter int TAGW      = 1      // opaque per-frame tag width
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           bin_valid,
  input  logic signed [XW-1:0]           bin_re,
  input  logic signed [XW-1:0]           bin_im,
  input  logic [$clog2(N)-1:0]           bin_idx,
  input  logic                           bin_first,
  input  logic                           bin_last,
  input  logic [$clog2(N)-1:0]           cfg_wu,
  input  logic [$clog2(N)-1:0]           cfg_wl,
  input  logic [$clog2(LOG2M_MAX+1)-1:0] cfg_log2m,
  input  logic [TAGW-1:0]                cfg_tag,
  output logic                           est_valid,
  output logic [$clog2(N)-1:0]           est_k,
  output logic [AW-1:0]                  est_phi,
  output logic [TAGW-1:0]                est_tag
);
  localparam int LN  = $clog2(N);
  localparam int MW  = 2 * XW;
  localparam int MLW = $clog2(LOG2M_MAX + 1);

  // Frame configuration, held for the whole frame.
  logic [LN-1:0]   wu, wl;
  logic [MLW-1:0]  log2m_f;
  logic [TAGW-1:0] tag_f;

  // Stage 1: squared magnitude and window test.
  logic                 s1_v, s1_first, s1_last, s1_ok;
  logic [MW-1:0]        s1_mag;
  logic [LN-1:0]        s1_idx;
  logic signed [XW-1:0] s1_re, s1_im;

  logic [LN-1:0] wu_c, wl_c;
  assign wu_c = bin_first ? cfg_wu : wu;
  assign wl_c = bin_first ? cfg_wl : wl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wu <= '0; wl <= '0; log2m_f <= '0; tag_f <= '0;
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_ok <= 1'b0;
      s1_mag <= '0; s1_idx <= '0; s1_re <= '0; s1_im <= '0;
    end else begin
      if (bin_valid && bin_first) begin
        wu <= cfg_wu; wl <= cfg_wl; log2m_f <= cfg_log2m; tag_f <= cfg_tag;
      end
      s1_v     <= bin_valid;
      s1_first <= bin_valid && bin_first;
      s1_last  <= bin_valid && bin_last;
      s1_ok    <= (bin_idx <= wu_c) || (bin_idx >= wl_c);
      s1_mag   <= MW'(bin_re * bin_re) + MW'(bin_im * bin_im);
      s1_idx   <= bin_idx;
      s1_re    <= bin_re;
      s1_im    <= bin_im;
    end
  end

  // Stage 2: running maximum over the allowed bins.
  logic                 have, have_n;
  logic [MW-1:0]        best_mag, best_mag_n;
  logic [LN-1:0]        best_k, best_k_n;
  logic signed [XW-1:0] best_re, best_im, best_re_n, best_im_n;

  always_comb begin
    have_n = have; best_mag_n = best_mag; best_k_n = best_k;
    best_re_n = best_re; best_im_n = best_im;
    if (s1_v) begin
      if (s1_first) have_n = 1'b0;
      if (s1_ok && (!have_n || s1_mag > best_mag || s1_first)) begin
        have_n = 1'b1; best_mag_n = s1_mag; best_k_n = s1_idx;
        best_re_n = s1_re; best_im_n = s1_im;
      end else if (s1_first) begin
        best_mag_n = '0; best_k_n = '0; best_re_n = '0; best_im_n = '0;
      end
    end
  end

  logic            c_start, c_busy, c_done;
  logic [AW-1:0]   c_angle;
  logic [LN-1:0]   k_hold;
  logic [MLW-1:0]  m_hold;
  logic [TAGW-1:0] t_hold;
  logic signed [XW-1:0] c_re, c_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= 1'b0; best_mag <= '0; best_k <= '0; best_re <= '0; best_im <= '0;
      c_start <= 1'b0; c_re <= '0; c_im <= '0;
      k_hold <= '0; m_hold <= '0; t_hold <= '0;
    end else begin
      have <= have_n; best_mag <= best_mag_n; best_k <= best_k_n;
      best_re <= best_re_n; best_im <= best_im_n;
      c_start <= s1_v && s1_last;
      if (s1_v && s1_last) begin
        c_re <= best_re_n; c_im <= best_im_n;
        k_hold <= best_k_n; m_hold <= log2m_f; t_hold <= tag_f;
      end
    end
  end

  cordic_serial #(.IW(XW), .AW(AW), .ITER(AW)) u_arg (
    .clk, .rst_n, .start(c_start), .in_re(c_re), .in_im(c_im),
    .busy(c_busy), .done(c_done), .angle(c_angle)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid <= 1'b0; est_k <= '0; est_phi <= '0; est_tag <= '0;
    end else begin
      est_valid <= c_done;
      if (c_done) begin
        est_k   <= k_hold;
        est_phi <= c_angle >> m_hold;
        est_tag <= t_hold;
      end
    end
  end

endmodule

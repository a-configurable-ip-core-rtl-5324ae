// fft_sdf: streaming N-point FFT, one complex sample per clock.
//
// A chain of log2(N) radix-2 SDF decimation-in-frequency stages (fft_stage).
// The input stream is cut into consecutive frames of N samples, counted from
// the first valid sample after reset; the transform of each frame leaves the
// chain in bit-reversed bin order, and this block labels every output with
// its natural bin index k (out_idx) and marks the first and last bin of a
// frame.  The input gains one guard bit and each stage one more, so the
// output is IW+log2(N)+1 bits wide and cannot overflow; no scaling is applied.
//
// Timing: the first bin of a frame leaves N-1+log2(N) cycles after the
// first sample of that frame entered.  Because the stages advance only on
// valid data, the input must be gap-free: a frame's spectrum is pushed out by
// the following frame (feed zeros to flush).  The design description uses a vendor
// FFT core sized for twice the maximum burst length; the SDF architecture is
// this implementation's choice for a fully pipelined one-sample-per-cycle
// transform.
module fft_sdf #(
  parameter int N   = 1024,       // transform size, power of two >= 4
  parameter int IW  = 8,          // input width per component
  parameter int TWW = 12          // twiddle width
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic signed [IW-1:0]           in_re,
  input  logic signed [IW-1:0]           in_im,
  output logic                           out_valid,
  output logic signed [IW+$clog2(N):0]   out_re,
  output logic signed [IW+$clog2(N):0]   out_im,
  output logic [$clog2(N)-1:0]           out_idx,
  output logic                           out_first,
  output logic                           out_last
);
  localparam int LN = $clog2(N);
  localparam int OW = IW + LN + 1;

  // The input is widened by one bit so that a twiddle rotation (which can
  // raise a component by sqrt(2)) never overflows; stage s then carries
  // IW+1+s bits on its input.  All links are OW wide here and each stage
  // uses the low bits it needs.
  logic                 v  [LN+1];
  logic signed [OW-1:0] re [LN+1];
  logic signed [OW-1:0] im [LN+1];

  assign v[0]  = in_valid;
  assign re[0] = OW'(in_re);
  assign im[0] = OW'(in_im);

  for (genvar s = 0; s < LN; s++) begin : g_st
    logic signed [IW+s+1:0] o_re, o_im;
    fft_stage #(.N(N), .S(s), .IW(IW + 1 + s), .TWW(TWW)) u_stage (
      .clk, .rst_n,
      .in_valid(v[s]), .in_re(re[s][IW+s:0]), .in_im(im[s][IW+s:0]),
      .out_valid(v[s+1]), .out_re(o_re), .out_im(o_im)
    );
    assign re[s+1] = OW'(o_re);
    assign im[s+1] = OW'(o_im);
  end

  // Output position counter; bin index is its bit reversal.
  logic [LN-1:0] ocnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ocnt <= '0;
    else if (v[LN]) ocnt <= ocnt + 1'b1;
  end

  always_comb begin
    for (int b = 0; b < LN; b++) out_idx[b] = ocnt[LN-1-b];
  end

  assign out_valid = v[LN];
  assign out_re    = re[LN];
  assign out_im    = im[LN];
  assign out_first = v[LN] && (ocnt == '0);
  assign out_last  = v[LN] && (&ocnt);

endmodule

// fft_stage: one radix-2 single-path delay-feedback (SDF) decimation-in-frequency
// stage of the streaming FFT.
//
// Stage S of an N-point transform works on blocks of 2D samples, D = N/2^(S+1).
// In the first half of a block the incoming samples are parked in a D-deep
// feedback memory while the differences left there by the previous block
// leave the stage, multiplied by the twiddle factor W_N^(n*2^S).  In the
// second half each incoming sample meets its partner from the memory: the sum
// leaves the stage and the difference goes into the memory.  One sample in,
// one sample out per enabled cycle; the stage needs D samples of a block
// before its first output (out_valid stays low until then).  The output is
// registered and grows by one bit; the twiddle product is rounded back to the
// data width (twiddle amplitude 2^(TWW-1)-1, n = 0 bypasses the multiplier).
// The stage advances only on in_valid, so a gap-free input stream is
// expected once the first sample has arrived.
module fft_stage #(
  parameter int N   = 1024,       // transform size
  parameter int S   = 0,          // stage index, 0 .. log2(N)-1
  parameter int IW  = 8,          // input width per component
  parameter int TWW = 12          // twiddle width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [IW:0]   out_re,
  output logic signed [IW:0]   out_im
);
  import sync_pkg::*;

  localparam int LN   = $clog2(N);
  localparam int D    = N >> (S + 1);
  localparam int CW   = $clog2(2 * D);
  localparam int PTRW = (D > 1) ? $clog2(D) : 1;
  localparam int OW   = IW + 1;
  localparam real AMP = real'((1 << (TWW - 1)) - 1);

  // Twiddle ROM: W_N^(n*2^S) = cos(a) - j sin(a), a = 2*pi*n*2^S/N.
  typedef logic signed [TWW-1:0] tw_tab_t [D];
  function automatic tw_tab_t gen_tw(input bit im);
    tw_tab_t tab;
    for (int n = 0; n < D; n++) begin
      longint e;
      e = longint'(n) << S;
      tab[n] = im ? TWW'(-sin_units(e, LN, AMP)) : TWW'(sin_units(e + (longint'(N) / 4), LN, AMP));
    end
    return tab;
  endfunction
  localparam tw_tab_t TW_RE = gen_tw(1'b0);
  localparam tw_tab_t TW_IM = gen_tw(1'b1);

  logic [CW-1:0]   cnt;
  logic [PTRW-1:0] ptr;
  logic            primed;      // a full block of differences is in the memory
  logic signed [OW-1:0] mem_re [D];
  logic signed [OW-1:0] mem_im [D];

  logic second_half;
  assign second_half = cnt[CW-1];

  logic signed [OW-1:0] d_re, d_im, x_re, x_im;
  assign d_re = mem_re[ptr];
  assign d_im = mem_im[ptr];
  assign x_re = OW'(in_re);
  assign x_im = OW'(in_im);

  // Twiddle multiply of the difference leaving in the first half.
  localparam int NW = (D > 1) ? CW - 1 : 1;
  logic [NW-1:0] n_idx;      // position inside the half block
  if (D > 1) begin : g_nidx
    assign n_idx = cnt[NW-1:0];
  end else begin : g_nidx1
    assign n_idx = 1'b0;
  end
  logic signed [TWW-1:0] w_re, w_im;
  localparam int PW = OW + TWW;
  logic signed [PW-1:0] m_re, m_im;
  always_comb begin
    w_re  = TW_RE[int'(n_idx)];
    w_im  = TW_IM[int'(n_idx)];
    m_re  = PW'(d_re) * PW'(w_re) - PW'(d_im) * PW'(w_im) + (PW'(1) <<< (TWW - 2));
    m_im  = PW'(d_re) * PW'(w_im) + PW'(d_im) * PW'(w_re) + (PW'(1) <<< (TWW - 2));
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem_re[ptr] <= second_half ? d_re - x_re : x_re;
      mem_im[ptr] <= second_half ? d_im - x_im : x_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; ptr <= '0; primed <= 1'b0;
      out_valid <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        ptr <= (int'(ptr) == D - 1) ? '0 : ptr + 1'b1;
        if (&cnt) primed <= 1'b1;
        if (second_half) begin
          out_valid <= 1'b1;
          out_re    <= d_re + x_re;
          out_im    <= d_im + x_im;
        end else begin
          out_valid <= primed;
          if (n_idx == '0) begin
            out_re <= d_re;
            out_im <= d_im;
          end else begin
            out_re <= m_re[TWW-1 +: OW];
            out_im <= m_im[TWW-1 +: OW];
          end
        end
      end
    end
  end

endmodule

// scl: sine/cosine look-up table (SCL) with one registered output stage.
//
// Maps a PW-bit phase word p (angle 2*pi*p/2^PW) to cos and sin scaled by
// 2^(OW-1)-1.  Only a quarter wave is stored: 2^(PW-2)+1 entries of
// sin(0..pi/2), built at elaboration time; the quadrant (top two phase bits)
// selects mirroring and sign.  Both outputs are read from the same ROM in the
// same cycle.  Latency one cycle, one phase per cycle.
//
// The design description uses an SCL core for e^{jx} in modulation removal and in the
// final rotation; the quarter-wave organisation, widths and rounding are
// choices of this implementation.
module scl #(
  parameter int PW = 8,           // phase word width (>= 3)
  parameter int OW = 8            // output width, signed
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PW-1:0]        phase,
  output logic signed [OW-1:0] cos_o,
  output logic signed [OW-1:0] sin_o
);
  import sync_pkg::*;

  localparam int QW = PW - 2;                 // index width inside a quadrant
  localparam int Q  = 1 << QW;                // quarter-wave size
  localparam real AMP = real'((1 << (OW - 1)) - 1);

  typedef logic [OW-2:0] qtab_t [Q+1];
  function automatic qtab_t gen_quarter();
    qtab_t tab;
    for (int i = 0; i <= Q; i++) tab[i] = (OW-1)'(sin_units(longint'(i), PW, AMP));
    return tab;
  endfunction
  localparam qtab_t QSIN = gen_quarter();

  // sin of an arbitrary phase word from the quarter table.
  function automatic logic signed [OW-1:0] sin_of(input logic [PW-1:0] p);
    logic [1:0]    quad;
    logic [QW-1:0] idx;
    logic [OW-2:0] m;
    quad = p[PW-1:PW-2];
    idx  = p[QW-1:0];
    m    = quad[0] ? QSIN[Q - int'(idx)] : QSIN[int'(idx)];
    return quad[1] ? -$signed({1'b0, m}) : $signed({1'b0, m});
  endfunction

  logic [PW-1:0] phase_c;   // cos(p) = sin(p + pi/2)
  assign phase_c = phase + (PW'(1) << (PW - 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      cos_o <= sin_of(phase_c);
      sin_o <= sin_of(phase);
    end
  end

endmodule

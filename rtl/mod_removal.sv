// mod_removal: improved MPSK modulation removal, r~(l) = |r(l)| * e^{j M arg r(l)}.
//
// The sample is converted to polar form by a pipelined CORDIC.  Multiplying
// the angle by M = 2^log2m is a left shift of the phase word (wrap-around is
// modulo 2*pi for free).  A sine/cosine table turns the new angle back into a
// unit vector, and two multipliers scale it by the magnitude, giving the
// Cartesian sample the FFT needs.  Because the phase multiplication is a
// shift, every M = 2^m with m <= LOG2M_MAX is supported at run time at no
// extra cost.
//
// Interface: in_valid/in_i/in_q (signed IW) with in_log2m, the modulation of
// that sample; out_valid/out_i/out_q (signed IW+2).  The magnitude carries
// the CORDIC gain of about 1.647 and the table amplitude 2^(SOW-1)-1 is
// removed by a rounded shift, so |out| ~= 1.647*|in|.  Latency CORDIC
// (AW+2) + table (1) + multiplier (1) = AW+4 cycles, one sample per clock.
// The structure (CORDIC, SCL, multipliers) follows the design description; widths
// and the angle resolution are choices of this implementation.
module mod_removal #(
  parameter int IW        = 6,    // input bit width per component
  parameter int LOG2M_MAX = 2,    // largest log2(M) supported
  parameter int SPW       = 8,    // phase width at the sine/cosine table
  parameter int SOW       = 8     // sine/cosine amplitude width
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic signed [IW-1:0]            in_i,
  input  logic signed [IW-1:0]            in_q,
  input  logic [$clog2(LOG2M_MAX+1)-1:0]  in_log2m,
  output logic                            out_valid,
  output logic signed [IW+1:0]            out_i,
  output logic signed [IW+1:0]            out_q
);
  localparam int AW  = SPW + LOG2M_MAX;  // CORDIC angle resolution
  localparam int CL  = AW + 2;           // CORDIC latency
  localparam int MLW = $clog2(LOG2M_MAX + 1);

  logic          c_valid;
  logic [IW:0]   c_mag;
  logic [AW-1:0] c_ang;

  cordic_vec_pipe #(.IW(IW), .AW(AW), .ITER(AW)) u_cordic (
    .clk, .rst_n, .in_valid, .in_i, .in_q,
    .out_valid(c_valid), .out_mag(c_mag), .out_ang(c_ang)
  );

  // Carry log2(M) alongside the sample through the CORDIC.
  logic [MLW-1:0] m_dly [CL];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CL; i++) m_dly[i] <= '0;
    end else begin
      m_dly[0] <= in_log2m;
      for (int i = 1; i < CL; i++) m_dly[i] <= m_dly[i-1];
    end
  end

  // Angle times M, then keep the SPW most significant bits for the table.
  logic [AW-1:0] ang_m;
  assign ang_m = c_ang << m_dly[CL-1];

  logic signed [SOW-1:0] s_cos, s_sin;
  scl #(.PW(SPW), .OW(SOW)) u_scl (
    .clk, .rst_n, .phase(ang_m[AW-1 -: SPW]), .cos_o(s_cos), .sin_o(s_sin)
  );

  logic        t_valid;
  logic [IW:0] t_mag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0; t_mag <= '0;
    end else begin
      t_valid <= c_valid;
      t_mag   <= c_mag;
    end
  end

  localparam int PRW = IW + 1 + SOW + 1;
  logic signed [PRW-1:0] p_i, p_q;
  assign p_i = $signed({1'b0, t_mag}) * s_cos + (PRW'(1) <<< (SOW - 2));
  assign p_q = $signed({1'b0, t_mag}) * s_sin + (PRW'(1) <<< (SOW - 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= t_valid;
      out_i     <= p_i[SOW-1 +: IW+2];
      out_q     <= p_q[SOW-1 +: IW+2];
    end
  end

endmodule

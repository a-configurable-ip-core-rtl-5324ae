// cordic_vec_pipe: fully pipelined vectoring CORDIC (Cartesian to polar).
//
// Converts one complex sample per clock into magnitude and angle, as the
// front stage of modulation removal needs.  A quadrant pre-rotation folds the
// vector into the right half plane (adding half a turn to the angle), then
// ITER micro-rotations on words with four fractional guard bits drive y to zero while accumulating atan(2^-i) into the
// angle register.  The magnitude is not compensated for the CORDIC gain
// (about 1.647); downstream blocks only use it as a relative weight.
//
// Interface: in_valid/in_i/in_q (signed IW bits); out_valid/out_mag (unsigned
// IW+1 bits, = 1.647*|r| truncated) and out_ang (unsigned AW-bit phase word,
// angle = 2*pi*out_ang/2^AW).  Latency is ITER+2 cycles, throughput one
// sample per cycle, no back-pressure.  The use of a pipelined CORDIC follows
// the design description; the widths, iteration count and the two guard bits
// on the angle path are choices of this implementation.
module cordic_vec_pipe #(
  parameter int IW   = 6,         // input width per component
  parameter int AW   = 10,        // output angle word width
  parameter int ITER = AW         // number of micro-rotations
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_i,
  input  logic signed [IW-1:0] in_q,
  output logic                 out_valid,
  output logic        [IW:0]   out_mag,
  output logic        [AW-1:0] out_ang
);
  import sync_pkg::*;

  localparam int GB = 4;          // fractional guard bits against truncation drift
  localparam int XW = IW + 2 + GB; // sign + growth of 1.647*sqrt(2) + guard bits
  localparam int ZW = AW + 2;     // angle width with two guard bits

  typedef logic [ZW-1:0] atan_tab_t [ITER];
  function automatic atan_tab_t gen_atan();
    atan_tab_t tab;
    for (int i = 0; i < ITER; i++) tab[i] = ZW'(atan_units(i, ZW));
    return tab;
  endfunction
  localparam atan_tab_t ATAN = gen_atan();

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic        [ZW-1:0] z [ITER+1];
  logic                 v [ITER+1];

  // Stage 0: fold into the right half plane.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      if (in_i < 0) begin
        x[0] <= -(XW'(in_i) <<< GB);
        y[0] <= -(XW'(in_q) <<< GB);
        z[0] <= ZW'(1) << (ZW - 1);
      end else begin
        x[0] <= XW'(in_i) <<< GB;
        y[0] <= XW'(in_q) <<< GB;
        z[0] <= '0;
      end
    end
  end

  for (genvar s = 0; s < ITER; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[s+1] <= '0; y[s+1] <= '0; z[s+1] <= '0; v[s+1] <= 1'b0;
      end else begin
        v[s+1] <= v[s];
        if (y[s] >= 0) begin
          x[s+1] <= x[s] + (y[s] >>> s);
          y[s+1] <= y[s] - (x[s] >>> s);
          z[s+1] <= z[s] + ATAN[s];
        end else begin
          x[s+1] <= x[s] - (y[s] >>> s);
          y[s+1] <= y[s] + (x[s] >>> s);
          z[s+1] <= z[s] - ATAN[s];
        end
      end
    end
  end

  // Output register: round the angle to AW bits, drop the guard bits and the
  // (always zero) sign bit of the magnitude.
  logic [ZW-1:0] z_rnd;
  logic [XW-1:0] x_rnd;
  assign z_rnd = z[ITER] + ZW'(2);
  assign x_rnd = x[ITER] + XW'(1 << (GB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_mag <= '0; out_ang <= '0;
    end else begin
      out_valid <= v[ITER];
      out_mag   <= x_rnd[GB +: IW+1];
      out_ang   <= z_rnd[ZW-1:2];
    end
  end

endmodule

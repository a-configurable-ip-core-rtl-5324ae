// cordic_serial: small iterative vectoring CORDIC that returns only the angle
// of one complex value.
//
// Used once per burst by the spectral analysis to evaluate arg(X(k_fw)), so a
// serial structure is enough: after a start pulse the vector is folded into
// the right half plane, then one micro-rotation is done per clock.  The
// magnitude path is kept only as the working register of the rotation and is
// not an output.
//
// Interface: start with in_re/in_im (signed IW) when busy is low; done pulses
// for one cycle ITER+1 cycles after start with angle (unsigned AW-bit phase
// word, angle = 2*pi*angle/2^AW).  A start while busy is ignored.  The serial
// organisation follows the design description; widths and iteration count are
// choices of this implementation.
module cordic_serial #(
  parameter int IW   = 19,        // input width per component
  parameter int AW   = 12,        // output angle width
  parameter int ITER = AW         // micro-rotations
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 busy,
  output logic                 done,
  output logic [AW-1:0]        angle
);
  import sync_pkg::*;

  localparam int GB = 3;          // fractional guard bits against truncation drift
  localparam int XW = IW + 2 + GB;
  localparam int ZW = AW + 2;
  localparam int IC = $clog2(ITER + 1);

  typedef logic [ZW-1:0] atan_tab_t [ITER];
  function automatic atan_tab_t gen_atan();
    atan_tab_t tab;
    for (int i = 0; i < ITER; i++) tab[i] = ZW'(atan_units(i, ZW));
    return tab;
  endfunction
  localparam atan_tab_t ATAN = gen_atan();

  logic signed [XW-1:0] x, y;
  logic        [ZW-1:0] z;
  logic        [IC-1:0] it;
  logic        [ZW-1:0] z_rnd;

  assign z_rnd = z + ZW'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0;
      busy <= 1'b0; done <= 1'b0; angle <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          it   <= '0;
          if (in_re < 0) begin
            x <= -(XW'(in_re) <<< GB); y <= -(XW'(in_im) <<< GB); z <= ZW'(1) << (ZW - 1);
          end else begin
            x <= XW'(in_re) <<< GB;  y <= XW'(in_im) <<< GB;  z <= '0;
          end
        end
      end else if (int'(it) == ITER) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        angle <= z_rnd[ZW-1:2];
      end else begin
        it <= it + 1'b1;
        if (y >= 0) begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + ATAN[it];
        end else begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - ATAN[it];
        end
      end
    end
  end

endmodule

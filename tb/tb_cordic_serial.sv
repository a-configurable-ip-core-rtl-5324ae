// tb_cordic_serial: self-checking testbench of the serial angle CORDIC.
//
// Issues 600 random vectors of up to 19 bits (plus the four axis directions
// and small vectors), waiting for done each time, and compares the angle
// with atan2 computed in floating point to within 1.5 LSB of the 12-bit
// phase word.  Checks that done comes ITER+1 = 13 cycles after start, that
// busy covers the computation and that a start while busy is ignored.
module tb_cordic_serial;
  localparam int IW = 19;
  localparam int AW = 12;
  localparam int NV = 600;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic signed [IW-1:0] in_re, in_im;
  logic [AW-1:0] angle;

  cordic_serial dut (.*);

  int checks = 0, failures = 0;

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
    repeat (NV * 20 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; in_re = '0; in_im = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      int re, im, lat;
      real a, ea, d, m;
      case (v)
        0: begin re = 100000; im = 0; end
        1: begin re = 0; im = 100000; end
        2: begin re = -100000; im = 0; end
        3: begin re = 0; im = -100000; end
        4: begin re = 3; im = -5; end
        default: begin
          re = int'($urandom_range(2 ** IW - 1)) - 2 ** (IW - 1);
          im = int'($urandom_range(2 ** IW - 1)) - 2 ** (IW - 1);
        end
      endcase
      #1;
      start <= 1'b1; in_re <= IW'(re); in_im <= IW'(im);
      @(posedge clk);
      #1;
      check(busy, "busy not raised");
      // a second start while busy must be ignored
      in_re <= IW'(-re); in_im <= IW'(-im);
      lat = 0;
      while (!done) begin
        @(posedge clk);
        #1;
        start <= 1'b0;
        lat++;
      end
      check(lat == AW + 1, $sformatf("done after %0d cycles, expected %0d", lat, AW + 1));
      a  = atan2(real'(im), real'(re));
      ea = 2.0 * PI * real'(angle) / real'(1 << AW);
      d  = ea - a;
      while (d > PI) d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      m = $sqrt(real'(re) * real'(re) + real'(im) * real'(im));
      check(fabs(d) <= 1.5 * 2.0 * PI / real'(1 << AW) + 1.0 / m,
            $sformatf("(%0d,%0d) angle %f want %f", re, im, ea, a));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cordic_vec_pipe: self-checking testbench of the pipelined vectoring CORDIC.
//
// Streams every one of the 4096 6-bit input vectors, one per clock, and
// compares the outputs with G*|r| (G = 1.6468) and atan2(q, i) computed in
// floating point: magnitude within 1 LSB, angle within 1.5 LSB of the 10-bit
// phase word plus the quantisation angle of the vector (vectors near the
// origin carry little angle information).  Also checks the latency of
// AW+2 = 12 cycles and that outputs arrive one per clock.
module tb_cordic_vec_pipe;
  localparam int IW = 6;
  localparam int AW = 10;
  localparam int LAT = AW + 2;
  localparam int NS = 1 << (2 * IW);
  localparam real PI = 3.14159265358979323846;
  localparam real G  = 1.646760258;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [IW-1:0] in_i, in_q;
  logic [IW:0] out_mag;
  logic [AW-1:0] out_ang;

  cordic_vec_pipe dut (.*);

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
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, first_in = -1, oc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in = cyc;
    if (out_valid) begin
      int vi, vq;
      real m, a, ea, d;
      vi = (oc % 64) - 32;
      vq = (oc / 64) - 32;
      if (oc == 0) check(cyc - first_in == LAT, $sformatf("latency %0d", cyc - first_in));
      m = $sqrt(real'(vi * vi + vq * vq));
      check(fabs(G * m - real'(out_mag)) <= 1.0,
            $sformatf("(%0d,%0d) magnitude %0d want %f", vi, vq, out_mag, G * m));
      if (vi != 0 || vq != 0) begin
        a  = atan2(real'(vq), real'(vi));
        ea = 2.0 * PI * real'(out_ang) / real'(1 << AW);
        d  = ea - a;
        while (d > PI) d -= 2.0 * PI;
        while (d < -PI) d += 2.0 * PI;
        check(fabs(d) <= 1.5 * 2.0 * PI / real'(1 << AW) + 0.5 / m,
              $sformatf("(%0d,%0d) angle %f want %f", vi, vq, ea, a));
      end
      oc++;
      if (oc == NS) begin
        check(cyc - first_in == LAT + NS - 1, "rate is not one sample per clock");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_i = '0; in_q = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      in_valid <= 1'b1;
      in_i <= IW'((n % 64) - 32);
      in_q <= IW'((n / 64) - 32);
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end
endmodule

// tb_mod_removal: self-checking testbench of the modulation removal.
//
// Random 6-bit samples are streamed one per clock with a random modulation
// index M in {1, 2, 4}.  Each output is compared with |r|*G*e^{j M arg r}
// computed in floating point (G = 1.6468, the CORDIC gain), allowing for the
// angle and amplitude quantisation.  The latency (AW+4 = 14 cycles at
// SPW = 8, LOG2M_MAX = 2) and the one-sample-per-clock rate are checked.
module tb_mod_removal;
  localparam int IW = 6;
  localparam int LAT = 14;
  localparam int NS = 2000;
  localparam real PI = 3.14159265358979323846;
  localparam real G  = 1.646760258;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [IW-1:0] in_i, in_q;
  logic [1:0] in_log2m;
  logic signed [IW+1:0] out_i, out_q;

  mod_removal dut (.*);

  int checks = 0, failures = 0;
  int si [NS], sq [NS], sm [NS];

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

  int cyc = 0, in_cnt = 0, out_cnt = 0, first_in = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) begin
      if (first_in < 0) first_in = cyc;
      in_cnt++;
    end
    if (out_valid) begin
      real mag, a, ei, eq;
      if (out_cnt == 0) check(cyc - first_in == LAT, $sformatf("latency %0d", cyc - first_in));
      mag = G * $sqrt(real'(si[out_cnt] * si[out_cnt] + sq[out_cnt] * sq[out_cnt]));
      a   = real'(sm[out_cnt]) * atan2(real'(sq[out_cnt]), real'(si[out_cnt]));
      ei  = mag * $cos(a);
      eq  = mag * $sin(a);
      // angle error up to ~2*pi/256*M plus 1.5 LSB of rounding
      check(fabs(ei - real'(out_i)) <= 1.5 + mag * 0.1 && fabs(eq - real'(out_q)) <= 1.5 + mag * 0.1,
            $sformatf("sample %0d (%0d,%0d) M=%0d: got (%0d,%0d) want (%f,%f)",
                      out_cnt, si[out_cnt], sq[out_cnt], sm[out_cnt], out_i, out_q, ei, eq));
      out_cnt++;
      if (out_cnt == NS) begin
        check(cyc - first_in == LAT + NS - 1, "rate is not one sample per clock");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      si[n] = int'($urandom_range(63)) - 32;
      sq[n] = int'($urandom_range(63)) - 32;
      sm[n] = 1 << $urandom_range(2);
    end
    in_valid = 1'b0; in_i = '0; in_q = '0; in_log2m = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      in_valid <= 1'b1;
      in_i <= IW'(si[n]);
      in_q <= IW'(sq[n]);
      in_log2m <= (sm[n] == 4) ? 2'd2 : (sm[n] == 2) ? 2'd1 : 2'd0;
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end
endmodule

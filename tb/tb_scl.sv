// tb_scl: self-checking testbench of the sine/cosine look-up table.
//
// Two tables are tested side by side: one at the module's default size
// (8-bit phase, 8-bit output, as used by the modulation removal) and one
// with a 12-bit phase and 10-bit output, as used by the correction.  The
// 12-bit phase sweeps every word once, all four quadrants, so the
// quarter-wave mirroring and the sign logic are exercised; the default
// table gets the top 8 bits of the same word and so sees every phase too.
// Both outputs are compared with round(A*cos), round(A*sin),
// A = 2^(OW-1)-1, computed in floating point; at most one LSB of difference
// is accepted.  A new phase is presented every clock and checked one cycle
// later, which checks the one-cycle latency.
module tb_scl;
  localparam int PW  = 12;    // wide table
  localparam int OW  = 10;
  localparam int PWD = 8;     // the module's defaults
  localparam int OWD = 8;
  localparam real PI = 3.14159265358979323846;
  localparam real A  = real'((1 << (OW - 1)) - 1);
  localparam real AD = real'((1 << (OWD - 1)) - 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PW-1:0] phase;
  logic signed [OW-1:0] cos_o, sin_o;
  logic [PWD-1:0] phase_d;
  logic signed [OWD-1:0] cos_d, sin_d;

  scl #(.PW(PW), .OW(OW)) dut (.*);
  scl dut_def (.clk, .rst_n, .phase(phase_d), .cos_o(cos_d), .sin_o(sin_d));

  int checks = 0, failures = 0;

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  initial begin
    repeat ((1 << PW) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = '0;
    phase_d = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < (1 << PW); p++) begin
      phase   <= PW'(p);
      phase_d <= PWD'(p >> (PW - PWD));
      @(posedge clk);
      #1;
      begin
        real a, ec, es;
        a  = 2.0 * PI * real'(p) / real'(1 << PW);
        ec = A * $cos(a);
        es = A * $sin(a);
        checks++;
        if (fabs(ec - real'(cos_o)) > 1.0 || fabs(es - real'(sin_o)) > 1.0) begin
          failures++;
          if (failures < 10)
            $display("FAIL: phase %0d got %0d,%0d want %f,%f", p, cos_o, sin_o, ec, es);
        end
        a  = 2.0 * PI * real'(p >> (PW - PWD)) / real'(1 << PWD);
        ec = AD * $cos(a);
        es = AD * $sin(a);
        checks++;
        if (fabs(ec - real'(cos_d)) > 1.0 || fabs(es - real'(sin_d)) > 1.0) begin
          failures++;
          if (failures < 10)
            $display("FAIL: default table, phase %0d got %0d,%0d want %f,%f",
                     p >> (PW - PWD), cos_d, sin_d, ec, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

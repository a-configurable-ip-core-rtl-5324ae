// tb_pf_correction: self-checking testbench of the frequency/phase correction.
//
// Runs at the module's default size (6-bit samples, MBL = 512, N = 1024).
// A behavioural RAM with one cycle read latency is filled with random 6-bit
// samples.  Twenty corrections with random bin k (both signs), phase word,
// modulation index M in {1, 2, 4}, length and base address are started, one
// after the other.  Each output must equal r(l)*e^{-j(2*pi*k_s*l/(M*N) + Phi)}
// computed in floating point within 1 LSB per component, the reads must be
// consecutive from the base address, the first output must come two cycles
// after the first read, outputs must be one per clock, and out_first/out_last
// must frame the burst.
module tb_pf_correction;
  localparam int BW  = 6;       // the module's defaults
  localparam int MBL = 512;
  localparam int N   = 2 * MBL;
  localparam int LN  = $clog2(N);
  localparam int LM  = 2;
  localparam int AW  = LN + LM;
  localparam int RAW = 11;
  localparam int LW  = $clog2(MBL + 1);
  localparam int NR  = 20;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, rd_en, out_valid, out_first, out_last;
  logic [LN-1:0] k;
  logic [AW-1:0] phi;
  logic [1:0] log2m;
  logic [LW-1:0] len;
  logic [RAW-1:0] base, rd_addr;
  logic [2*BW-1:0] rd_data;
  logic signed [BW:0] out_i, out_q;

  pf_correction dut (.*);

  // behavioural RAM model
  logic [2*BW-1:0] mem [1 << RAW];
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  int checks = 0, failures = 0;

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (NR * (MBL + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int c_k, c_phi, c_m, c_len, c_base, rd_cnt, first_rd, ol;
  always @(posedge clk) begin
    if (rst_n && rd_en) begin
      if (rd_cnt == 0) first_rd = cyc;
      check(int'(rd_addr) == (c_base + rd_cnt) % (1 << RAW), "read address not consecutive");
      rd_cnt++;
    end
    if (rst_n && out_valid) begin
      int ri, rq, ks;
      real a, ei, eq;
      if (ol == 0) check(cyc - first_rd == 2, $sformatf("first output %0d cycles after read", cyc - first_rd));
      check(cyc - first_rd == ol + 2, "outputs not one per clock");
      ri = $signed(mem[(c_base + ol) % (1 << RAW)][2*BW-1:BW]);
      rq = $signed(mem[(c_base + ol) % (1 << RAW)][BW-1:0]);
      ks = (c_k >= N / 2) ? c_k - N : c_k;
      a  = -(2.0 * PI * real'(ks) * real'(ol) / real'(c_m * N) + 2.0 * PI * real'(c_phi) / real'(1 << AW));
      ei = real'(ri) * $cos(a) - real'(rq) * $sin(a);
      eq = real'(ri) * $sin(a) + real'(rq) * $cos(a);
      check(fabs(ei - real'(out_i)) <= 1.0 && fabs(eq - real'(out_q)) <= 1.0,
            $sformatf("l=%0d got %0d,%0d want %f,%f", ol, out_i, out_q, ei, eq));
      check(out_first == (ol == 0), "out_first");
      check(out_last == (ol == c_len - 1), "out_last");
      ol++;
    end
  end

  initial begin
    for (int a = 0; a < (1 << RAW); a++) mem[a] = (2*BW)'($urandom);
    start = 0; k = '0; phi = '0; log2m = '0; len = '0; base = '0;
    rd_cnt = 0; ol = 0; first_rd = 0;
    c_k = 0; c_phi = 0; c_m = 1; c_len = 0; c_base = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < NR; r++) begin
      #1;
      c_k = int'($urandom_range(N - 1));
      c_phi = int'($urandom_range((1 << AW) - 1));
      c_m = 1 << $urandom_range(LM);
      c_len = (r == 0) ? MBL : int'($urandom_range(MBL - 1)) + 1;
      c_base = int'($urandom_range((1 << RAW) - 1));
      rd_cnt = 0; ol = 0;
      start <= 1'b1;
      k <= LN'(c_k); phi <= AW'(c_phi); len <= LW'(c_len); base <= RAW'(c_base);
      log2m <= (c_m == 4) ? 2'd2 : (c_m == 2) ? 2'd1 : 2'd0;
      @(posedge clk);
      #1;
      start <= 1'b0;
      check(busy, "busy not raised");
      while (ol < c_len) @(posedge clk);
      #1;
      check(rd_cnt == c_len, $sformatf("%0d reads for a burst of %0d", rd_cnt, c_len));
      check(!busy, "busy after the burst");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pf_correction: joint frequency and phase correction of a buffered burst,
// u(l) = r(l) * e^{-j(2*pi*k_s*l/(M*N) + Phi)},  l = 0 .. L-1.
//
// A phase accumulator starts at Phi and advances by k_s*2^AW/(M*N) per
// sample, where k_s is the FFT bin read as a signed number (bins N/2..N-1 are
// negative offsets).  With AW = log2(N) + LOG2M_MAX the step is the integer
// k_s << (LOG2M_MAX - log2 M), so the accumulator is exact and wraps modulo
// 2*pi.  A sine/cosine table turns the phase into cos/sin, and four
// multipliers rotate the sample read back from the burst RAM by the
// conjugate: u_i = r_i*c + r_q*s, u_q = r_q*c - r_i*s, rounded back by the
// table amplitude 2^(SOW-1)-1.
//
// Interface: start (while busy is low) with k, phi, log2m, len (1..MBL) and
// base, the RAM address of the burst's first sample.  The block then issues
// len consecutive reads on rd_en/rd_addr (RAM with one cycle read latency)
// and delivers u on out_valid/out_i/out_q with out_first/out_last two cycles
// after the corresponding read is issued, one sample per clock.  The output
// is BW+1 bits wide because a rotated component can reach sqrt(2) times the
// largest input component.  The signed
// reading of k_fw and the widths are this implementation's choices; the
// rotation itself follows the design description.
module pf_correction #(
  parameter int BW        = 6,     // sample width per component
  parameter int MBL       = 512,   // maximum burst length
  parameter int N         = 1024,  // FFT size
  parameter int LOG2M_MAX = 2,
  parameter int SOW       = 10,    // sine/cosine amplitude width
  parameter int RAW       = 11     // RAM address width
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [$clog2(N)-1:0]           k,
  input  logic [$clog2(N)+LOG2M_MAX-1:0] phi,
  input  logic [$clog2(LOG2M_MAX+1)-1:0] log2m,
  input  logic [$clog2(MBL+1)-1:0]       len,
  input  logic [RAW-1:0]                 base,
  output logic                           busy,
  output logic                           rd_en,
  output logic [RAW-1:0]                 rd_addr,
  input  logic [2*BW-1:0]                rd_data,
  output logic                           out_valid,
  output logic signed [BW:0]             out_i,
  output logic signed [BW:0]             out_q,
  output logic                           out_first,
  output logic                           out_last
);
  localparam int LN = $clog2(N);
  localparam int AW = LN + LOG2M_MAX;
  localparam int LW = $clog2(MBL + 1);

  logic [AW-1:0] acc, inc;
  logic [LW-1:0] remain;
  logic          first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; acc <= '0; inc <= '0; remain <= '0; first_q <= 1'b0;
      rd_addr <= '0;
    end else begin
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          acc     <= phi;
          inc     <= AW'(signed'(k)) << (LOG2M_MAX - int'(log2m));
          remain  <= len;
          rd_addr <= base;
          first_q <= 1'b1;
        end
      end else begin
        acc     <= acc + inc;
        rd_addr <= rd_addr + 1'b1;
        remain  <= remain - 1'b1;
        first_q <= 1'b0;
        if (remain == LW'(1)) busy <= 1'b0;
      end
    end
  end

  assign rd_en = busy;

  // The table registers its output, aligned with the RAM read data.
  logic signed [SOW-1:0] c, s;
  scl #(.PW(AW), .OW(SOW)) u_scl (
    .clk, .rst_n, .phase(acc), .cos_o(c), .sin_o(s)
  );

  logic v1, f1, l1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0;
    end else begin
      v1 <= busy;
      f1 <= busy && first_q;
      l1 <= busy && (remain == LW'(1));
    end
  end

  localparam int PW = BW + SOW + 1;
  logic signed [BW-1:0] ri, rq;
  logic signed [PW-1:0] pi_, pq_;
  assign ri  = rd_data[2*BW-1:BW];
  assign rq  = rd_data[BW-1:0];
  assign pi_ = PW'(ri) * PW'(c) + PW'(rq) * PW'(s) + (PW'(1) <<< (SOW - 2));
  assign pq_ = PW'(rq) * PW'(c) - PW'(ri) * PW'(s) + (PW'(1) <<< (SOW - 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_i <= '0; out_q <= '0; out_first <= 1'b0; out_last <= 1'b0;
    end else begin
      out_valid <= v1;
      out_first <= f1;
      out_last  <= l1;
      if (v1) begin
        out_i <= pi_[SOW-1 +: BW+1];
        out_q <= pq_[SOW-1 +: BW+1];
      end
    end
  end

endmodule

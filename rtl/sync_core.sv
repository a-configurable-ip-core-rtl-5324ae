// sync_core: configurable IP core for combined blind frequency and phase
// synchronization of MPSK bursts (one sample per symbol).
//
// A burst r(0..L-1) is (1) stored in a RAM buffer and at the same time (2)
// stripped of its modulation, r~ = |r| e^{j M arg r}, (3) zero-padded to N =
// 2*MBL samples and transformed by a streaming FFT.  (4) The spectral
// analysis picks the largest bin k_fw inside the window and takes Phi =
// arg X(k_fw) / M.  (5) The buffered burst is then read back and rotated by
// e^{-j(2*pi*k_s*l/(M*N) + Phi)}, k_s being k_fw read as a signed bin.
//
// Framing: the core runs on a fixed grid of N-cycle frames counted from
// reset.  A burst can start only on the first cycle of a frame (in_ready is
// high there); the configuration (cfg_len = L, 1..MBL, 0 or more than MBL
// meaning MBL; cfg_log2m = log2 M; window cfg_wu/cfg_wl) is sampled with the
// first sample.  The remaining L-1 samples are taken on the next L-1 cycles,
// with in_ready high; a cycle without in_valid inside a burst enters a zero
// sample.  The rest of the frame is the FFT's zero padding, so one burst of
// up to MBL samples is accepted every N = 2*MBL cycles: half the clock rate
// at full bursts.  Each frame's burst parameters travel in a small tag queue
// from the input to the FFT output.  The RAM holds three bursts: a burst is
// read back about 2N cycles after it started, while the two bursts after it
// are being written, and its slot is not reused before 3N cycles.  For very
// small builds (MBL < 16) the fixed pipeline latency is no longer small
// against N, and a fourth slot is added.
//
// Outputs: est_valid pulses with est_k (k_fw) and est_phi (Phi as a phase word
// of log2(N)+LOG2M_MAX bits, i.e. units of 2*pi/(M_max*N)) exactly
// 2N + 2*log2(N) + 2*LOG2M_MAX + 15 cycles after a burst's first sample (2087
// at the defaults); the corrected samples u follow three cycles later on
// out_valid/out_i/out_q with out_first/out_last, L consecutive cycles.
// The corrected burst keeps an M-fold phase ambiguity (multiples of 2*pi/M),
// which a back end must resolve.  The block structure follows the published
// architecture, and the three-burst RAM matches its block RAM counts; the
// frame grid, the interfaces, the slot count and all internal widths are
// this implementation's choices.
module sync_core #(
  parameter int BW        = sync_pkg::DEF_BW,        // input bit width
  parameter int MBL       = sync_pkg::DEF_MBL,       // maximum burst length
  parameter int LOG2M_MAX = sync_pkg::DEF_LOG2M_MAX  // largest log2(M)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // burst input
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic signed [BW-1:0]           in_i,
  input  logic signed [BW-1:0]           in_q,
  input  logic [$clog2(MBL+1)-1:0]       cfg_len,
  input  logic [$clog2(LOG2M_MAX+1)-1:0] cfg_log2m,
  input  logic [$clog2(2*MBL)-1:0]       cfg_wu,
  input  logic [$clog2(2*MBL)-1:0]       cfg_wl,
  // estimates
  output logic                           est_valid,
  output logic [$clog2(2*MBL)-1:0]       est_k,
  output logic [$clog2(2*MBL)+LOG2M_MAX-1:0] est_phi,
  // corrected burst
  output logic                           out_valid,
  output logic signed [BW:0]             out_i,
  output logic signed [BW:0]             out_q,
  output logic                           out_first,
  output logic                           out_last
);
  localparam int N     = 2 * MBL;              // FFT points
  localparam int LN    = $clog2(N);
  localparam int LW    = $clog2(MBL + 1);
  localparam int MLW   = $clog2(LOG2M_MAX + 1);
  localparam int AW    = LN + LOG2M_MAX;       // phase word of the estimate
  localparam int RW    = BW + 2;               // width of r~ (FFT input)
  localparam int XW    = RW + LN + 1;          // FFT output width
  // RAM slots: burst b is read from 2N + RD0 cycles after its first sample
  // on, and the slot may be written again S*N cycles after that sample, so
  // S*N >= 2N + RD0.  Three slots for N >= 32 (MBL >= 16), four below.
  localparam int RD0   = 2 * LN + 2 * LOG2M_MAX + 16;
  localparam int NSLOT = 2 + (RD0 + N - 1) / N;
  localparam int SW    = $clog2(NSLOT);
  localparam int DEPTH = NSLOT * MBL;
  localparam int RAW   = $clog2(DEPTH);

  // Per-frame burst description.
  typedef struct packed {
    logic           active;
    logic [LW-1:0]  len;
    logic [MLW-1:0] log2m;
    logic [LN-1:0]  wu;
    logic [LN-1:0]  wl;
    logic [SW-1:0]  slot;
  } tag_t;

  // ---------------------------------------------------------------- framing
  logic [LN-1:0] fpos;          // position in the current frame
  logic          b_act;         // a burst occupies the current frame
  logic [LW-1:0] b_len;
  logic [MLW-1:0] b_log2m;
  logic [SW-1:0] b_slot, wslot;

  logic          frame_start, start_burst, in_burst;
  logic [LW-1:0] len_c;
  assign frame_start = (fpos == '0);
  assign start_burst = frame_start && in_valid;
  assign len_c       = (cfg_len == '0 || int'(cfg_len) > MBL) ? LW'(MBL) : cfg_len;
  assign in_burst    = b_act && !frame_start && (LW'(fpos) < b_len);
  assign in_ready    = frame_start || in_burst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fpos <= '0; b_act <= 1'b0; b_len <= '0; b_log2m <= '0; b_slot <= '0; wslot <= '0;
    end else begin
      fpos <= fpos + 1'b1;
      if (frame_start) begin
        b_act <= in_valid;
        if (in_valid) begin
          b_len   <= len_c;
          b_log2m <= cfg_log2m;
          b_slot  <= wslot;
          wslot   <= (int'(wslot) == NSLOT - 1) ? '0 : wslot + 1'b1;
        end
      end
    end
  end

  // Sample entering the core this cycle (zero outside a burst).
  logic                take, smp_we;
  logic signed [BW-1:0] s_i, s_q;
  logic [MLW-1:0]      s_log2m;
  logic [SW-1:0]       s_slot;
  assign take    = start_burst || in_burst;
  assign smp_we  = take;
  assign s_i     = (take && in_valid) ? in_i : '0;
  assign s_q     = (take && in_valid) ? in_q : '0;
  assign s_log2m = frame_start ? cfg_log2m : b_log2m;
  assign s_slot  = frame_start ? wslot : b_slot;

  // ----------------------------------------------------------- RAM buffer
  logic           rd_en;
  logic [RAW-1:0] rd_addr, wr_addr;
  logic [2*BW-1:0] rd_data;
  assign wr_addr = RAW'(int'(s_slot) * MBL) + RAW'(fpos);

  burst_ram #(.DEPTH(DEPTH), .DW(2 * BW)) u_ram (
    .clk, .we(smp_we), .waddr(wr_addr), .wdata({s_i, s_q}),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_data)
  );

  // ------------------------------------------------- modulation removal + FFT
  logic                 mr_valid;
  logic signed [RW-1:0] mr_i, mr_q;
  mod_removal #(.IW(BW), .LOG2M_MAX(LOG2M_MAX)) u_modrem (
    .clk, .rst_n, .in_valid(1'b1), .in_i(s_i), .in_q(s_q), .in_log2m(s_log2m),
    .out_valid(mr_valid), .out_i(mr_i), .out_q(mr_q)
  );

  logic                 x_valid, x_first, x_last;
  logic signed [XW-1:0] x_re, x_im;
  logic [LN-1:0]        x_idx;
  fft_sdf #(.N(N), .IW(RW)) u_fft (
    .clk, .rst_n, .in_valid(mr_valid), .in_re(mr_i), .in_im(mr_q),
    .out_valid(x_valid), .out_re(x_re), .out_im(x_im), .out_idx(x_idx),
    .out_first(x_first), .out_last(x_last)
  );

  // ------------------------------------------------------------ tag queue
  localparam int TQ = 4;
  tag_t          tq [TQ];
  logic [1:0]    tq_wp, tq_rp;
  logic [2:0]    tq_cnt;
  tag_t          tag_in, tag_head;
  logic          tq_pop;

  assign tag_in   = '{active: start_burst, len: len_c, log2m: cfg_log2m,
                      wu: cfg_wu, wl: cfg_wl, slot: wslot};
  assign tag_head = tq[tq_rp];
  assign tq_pop   = x_first && (tq_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_wp <= '0; tq_rp <= '0; tq_cnt <= '0;
      for (int i = 0; i < TQ; i++) tq[i] <= '0;
    end else begin
      if (frame_start) begin
        tq[tq_wp] <= tag_in;
        tq_wp     <= tq_wp + 1'b1;
      end
      if (tq_pop) tq_rp <= tq_rp + 1'b1;
      tq_cnt <= tq_cnt + 3'(frame_start) - 3'(tq_pop);
    end
  end

  // --------------------------------------------------- spectral analysis
  localparam int STW = 1 + LW + MLW + SW;
  logic [STW-1:0] sa_tag_in, sa_tag;
  logic           sa_valid;
  logic [LN-1:0]  sa_k;
  logic [AW-1:0]  sa_phi;
  assign sa_tag_in = {tag_head.active, tag_head.len, tag_head.log2m, tag_head.slot};

  spectral_analysis #(.N(N), .XW(XW), .AW(AW), .LOG2M_MAX(LOG2M_MAX), .TAGW(STW)) u_sa (
    .clk, .rst_n,
    .bin_valid(x_valid), .bin_re(x_re), .bin_im(x_im), .bin_idx(x_idx),
    .bin_first(x_first), .bin_last(x_last),
    .cfg_wu(tag_head.wu), .cfg_wl(tag_head.wl), .cfg_log2m(tag_head.log2m),
    .cfg_tag(sa_tag_in),
    .est_valid(sa_valid), .est_k(sa_k), .est_phi(sa_phi), .est_tag(sa_tag)
  );

  logic           e_active;
  logic [LW-1:0]  e_len;
  logic [MLW-1:0] e_log2m;
  logic [SW-1:0]  e_slot;
  assign {e_active, e_len, e_log2m, e_slot} = sa_tag;

  assign est_valid = sa_valid && e_active;
  assign est_k     = sa_k;
  assign est_phi   = sa_phi;

  // ------------------------------------------------ phase/freq. correction
  logic pc_busy;
  pf_correction #(.BW(BW), .MBL(MBL), .N(N), .LOG2M_MAX(LOG2M_MAX), .RAW(RAW)) u_corr (
    .clk, .rst_n,
    .start(est_valid), .k(sa_k), .phi(sa_phi), .log2m(e_log2m), .len(e_len),
    .base(RAW'(int'(e_slot) * MBL)),
    .busy(pc_busy), .rd_en, .rd_addr, .rd_data,
    .out_valid, .out_i, .out_q, .out_first, .out_last
  );

  // Rules of the frame grid: the tag queue never overflows or runs dry, and
  // a burst's correction has finished before the next estimate arrives.
  property p_tq_ok;
    @(posedge clk) disable iff (!rst_n) (tq_cnt <= 3'(TQ)) && !(x_first && tq_cnt == '0);
  endproperty
  a_tq_ok: assert property (p_tq_ok) else $error("tag queue out of step");

  property p_corr_free;
    @(posedge clk) disable iff (!rst_n) est_valid |-> !pc_busy;
  endproperty
  a_corr_free: assert property (p_corr_free) else $error("correction still busy");

endmodule

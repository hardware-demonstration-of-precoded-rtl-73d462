// Closed-loop precoded multi-beam forward link, gateway to terminals, in one
// clock domain.
//
// Gateway: N superframe generators (one per beam, aligned by a common symbol
// tick every OSF clocks) feed the block-level precoder x = W*s, whose outputs
// are pulse-shaped to OSF samples per symbol and shifted by a DUC.
// Channel emulator: per stream a DDC, the IMUX filter, the TWTA model and the
// OMUX filter; then the N x N MIMO channel matrix H mixes the streams, AWGN is
// added per stream and a DUC shifts them again.
// User terminals: per beam a DDC, the matched filter, the SOSF frame
// synchroniser, symbol timing, then fine phase recovery and the soft
// demodulator.  The CSI estimator works on the symbols ahead of phase
// recovery, so that the CSI keeps the channel's own phases, which the
// precoder must undo; this reverses the order of the two stages in the
// original receiver diagram and is this design's choice.  The CSI rows (P
// pilots: H; P2 pilots: H*W), the tagged symbols before and after phase
// recovery and the payload LLRs are brought out; computing W from the CSI
// is the host's job, as is the feedback link.
// The RF front ends, the radio I/O and the FIFO links between the FPGAs of
// the original test-bed are replaced by direct connections; decimation in the
// DDCs is an input and must stay 0 for the rates of this chain to match.
//
// Host register bus (cfg_we, cfg_addr, cfg_wdata), one write per clock:
//   0x0000 + 8*row + col  W entry {re[31:16], im[15:0]}     0x0100 commit W
//   0x0200 + 8*row + col  H entry                           0x0300 commit H
//   0x1000 + 64*bank + k  pulse-shaper tap k of roll-off bank (wdata[15:0])
//   0x2000 + k            IMUX tap k       0x2100 + k  OMUX tap k
//   0x2200 + k            matched-filter tap k
//   0x3000 + a            TWTA table entry a {re, im}
// Filters and the TWTA table are shared by all streams.  The map is this
// design's choice.
module pc_top
  import pc_pkg::*;
#(
  parameter int unsigned N         = NUM_STREAMS,
  parameter int unsigned PS_SPAN   = 8,
  parameter int unsigned FIR_TAPS  = 32,
  parameter int unsigned TWTA_AW   = 6,
  parameter int unsigned SYNC_WIN  = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host register bus
  input  logic                 cfg_we,
  input  logic [15:0]          cfg_addr,
  input  logic [31:0]          cfg_wdata,
  // gateway stream configuration
  input  logic [7:0]           modcod     [N],
  input  logic [3:0]           sffi       [N],
  input  logic [7:0]           wh_idx     [N],
  input  logic                 scr_pilots,
  input  logic                 scr_sosf,
  input  logic [1:0]           rank       [N],
  input  logic [NUM_SEGS-1:0]  prec_mask,
  input  logic [NUM_SEGS-1:0]  slp_mask,
  input  logic [1:0]           rolloff_sel,
  // payload bits, per stream
  input  logic                 bits_valid [N],
  input  logic [1:0]           bits       [N],
  output logic                 bits_ready [N],
  // radio frequencies and channel settings
  input  logic [31:0]          gw_fcw,
  input  logic [31:0]          ce_fcw,
  input  logic [2:0]           dec_log2,
  input  logic [15:0]          awgn_amp,
  input  logic [47:0]          sync_threshold,
  input  logic [3:0]           pll_mu_shift,
  input  logic [15:0]          llr_scale,
  // gateway status
  output logic                 sf_start,
  output logic                 w_applied,
  output logic                 slp_fallback,
  output logic [N-1:0]         tx_precoded,
  output logic [N-1:0]         underflow,
  output seg_t                 tx_seg,
  output logic [31:0]          h_updates,
  // terminal outputs
  output logic                 ut_sync      [N],
  output logic                 ut_locked    [N],
  output logic                 ut_sym_valid [N],
  output cplx_t                ut_sym       [N],
  output seg_t                 ut_sym_seg   [N],
  output logic [15:0]          ut_sym_idx   [N],
  output logic                 ut_csi_valid [N],
  output cplx_t                ut_csi       [N][N],
  output seg_t                 ut_csi_seg   [N],
  output cplx_t                ut_peak_corr [N],
  output logic [47:0]          ut_peak_metric [N],
  output logic [31:0]          ut_sync_count[N],
  output logic [31:0]          ut_csi_count [N],
  output logic                 ut_pr_valid  [N],
  output cplx_t                ut_pr_sym    [N],
  output seg_t                 ut_pr_seg    [N],
  output logic [15:0]          ut_pr_idx    [N],
  output logic [15:0]          ut_phase     [N],
  output logic                 ut_llr_valid [N],
  output logic signed [7:0]    ut_llr       [N][2],
  output logic [1:0]           ut_hard      [N]
);
  localparam int unsigned PS_TAPS = OSF * PS_SPAN;

  // ---------------- host register decode ----------------
  cplx_t cfg_c;
  assign cfg_c = '{re: cfg_wdata[31:16], im: cfg_wdata[15:0]};
  logic w_we, w_commit, h_we, h_commit, ps_we, imux_we, omux_we, mf_we, twta_we;
  always_comb begin
    w_we     = cfg_we && cfg_addr[15:8] == 8'h00;
    w_commit = cfg_we && cfg_addr == 16'h0100;
    h_we     = cfg_we && cfg_addr[15:8] == 8'h02;
    h_commit = cfg_we && cfg_addr == 16'h0300;
    ps_we    = cfg_we && cfg_addr[15:12] == 4'h1;
    imux_we  = cfg_we && cfg_addr[15:8] == 8'h20;
    omux_we  = cfg_we && cfg_addr[15:8] == 8'h21;
    mf_we    = cfg_we && cfg_addr[15:8] == 8'h22;
    twta_we  = cfg_we && cfg_addr[15:12] == 4'h3;
  end

  // ---------------- gateway ----------------
  logic [$clog2(OSF)-1:0] tick_cnt;
  logic                   sym_tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick_cnt <= '0;
    else        tick_cnt <= tick_cnt + 1'b1;
  end
  assign sym_tick = (tick_cnt == '0);

  logic  gen_valid [N];
  cplx_t gen_sym   [N];
  seg_t  gen_seg   [N];
  logic  gen_sfs   [N];

  for (genvar i = 0; i < N; i++) begin : g_gen
    superframe_gen u_gen (
      .clk, .rst_n,
      .sym_tick  (sym_tick),
      .modcod    (modcod[i]),
      .sffi      (sffi[i]),
      .wh_idx    (wh_idx[i]),
      .scr_pilots(scr_pilots),
      .scr_sosf  (scr_sosf),
      .bits_valid(bits_valid[i]),
      .bits      (bits[i]),
      .bits_ready(bits_ready[i]),
      .out_valid (gen_valid[i]),
      .out_sym   (gen_sym[i]),
      .out_seg   (gen_seg[i]),
      .sf_start  (gen_sfs[i]),
      .underflow (underflow[i])
    );
  end
  assign sf_start = gen_sfs[0];

  logic  pre_valid;
  cplx_t pre_sym [N];

  precoder #(.N(N)) u_precoder (
    .clk, .rst_n,
    .in_valid    (gen_valid[0]),
    .in_sym      (gen_sym),
    .in_seg      (gen_seg[0]),
    .rank        (rank),
    .prec_mask   (prec_mask),
    .slp_mask    (slp_mask),
    .w_we        (w_we),
    .w_row       (cfg_addr[5:3]),
    .w_col       (cfg_addr[2:0]),
    .w_data      (cfg_c),
    .w_commit    (w_commit),
    .out_valid   (pre_valid),
    .out_sym     (pre_sym),
    .out_seg     (tx_seg),
    .out_precoded(tx_precoded),
    .slp_fallback(slp_fallback),
    .w_applied   (w_applied)
  );

  logic  gw_valid [N];
  cplx_t gw_smp   [N];

  for (genvar i = 0; i < N; i++) begin : g_gw_tx
    logic  ps_valid;
    cplx_t ps_smp;
    pulse_shaper #(.SPAN(PS_SPAN)) u_ps (
      .clk, .rst_n,
      .in_valid   (pre_valid),
      .in_sym     (pre_sym[i]),
      .rolloff_sel(rolloff_sel),
      .out_valid  (ps_valid),
      .out_smp    (ps_smp),
      .coef_we    (ps_we),
      .coef_bank  (cfg_addr[7:6]),
      .coef_idx   (cfg_addr[$clog2(PS_TAPS)-1:0]),
      .coef_data  (cfg_wdata[15:0])
    );
    duc u_duc (
      .clk, .rst_n,
      .fcw      (gw_fcw),
      .in_valid (ps_valid),
      .in_smp   (ps_smp),
      .out_valid(gw_valid[i]),
      .out_smp  (gw_smp[i])
    );
  end

  // ---------------- channel emulator ----------------
  logic  pl_valid [N];
  cplx_t pl_smp   [N];

  for (genvar i = 0; i < N; i++) begin : g_ce_rx
    logic  dd_valid, im_valid, tw_valid;
    cplx_t dd_smp, im_smp, tw_smp;
    ddc u_ddc (
      .clk, .rst_n,
      .fcw      (gw_fcw),
      .dec_log2 (dec_log2),
      .in_valid (gw_valid[i]),
      .in_smp   (gw_smp[i]),
      .out_valid(dd_valid),
      .out_smp  (dd_smp)
    );
    fir_filter #(.NTAPS(FIR_TAPS)) u_imux (
      .clk, .rst_n,
      .in_valid (dd_valid),
      .in_smp   (dd_smp),
      .out_valid(im_valid),
      .out_smp  (im_smp),
      .coef_we  (imux_we),
      .coef_idx (cfg_addr[$clog2(FIR_TAPS)-1:0]),
      .coef_data(cfg_wdata[15:0])
    );
    twta #(.LUT_AW(TWTA_AW)) u_twta (
      .clk, .rst_n,
      .in_valid (im_valid),
      .in_smp   (im_smp),
      .out_valid(tw_valid),
      .out_smp  (tw_smp),
      .lut_we   (twta_we),
      .lut_addr (cfg_addr[TWTA_AW-1:0]),
      .lut_data (cfg_c)
    );
    fir_filter #(.NTAPS(FIR_TAPS)) u_omux (
      .clk, .rst_n,
      .in_valid (tw_valid),
      .in_smp   (tw_smp),
      .out_valid(pl_valid[i]),
      .out_smp  (pl_smp[i]),
      .coef_we  (omux_we),
      .coef_idx (cfg_addr[$clog2(FIR_TAPS)-1:0]),
      .coef_data(cfg_wdata[15:0])
    );
  end

  logic  ch_valid;
  cplx_t ch_smp [N];

  mimo_channel #(.N(N)) u_mimo (
    .clk, .rst_n,
    .in_valid (pl_valid[0]),
    .in_smp   (pl_smp),
    .out_valid(ch_valid),
    .out_smp  (ch_smp),
    .h_we     (h_we),
    .h_row    (cfg_addr[5:3]),
    .h_col    (cfg_addr[2:0]),
    .h_data   (cfg_c),
    .h_commit (h_commit),
    .h_updates(h_updates)
  );

  logic  ce_valid [N];
  cplx_t ce_smp   [N];

  for (genvar i = 0; i < N; i++) begin : g_ce_tx
    logic  nz_valid;
    cplx_t nz_smp;
    awgn #(
      .SEED_I(64'h9E37_79B9_7F4A_7C15 ^ (64'(i + 1) << 40)),
      .SEED_Q(64'hD1B5_4A32_D192_ED03 ^ (64'(i + 1) << 24))
    ) u_awgn (
      .clk, .rst_n,
      .amp      (awgn_amp),
      .in_valid (ch_valid),
      .in_smp   (ch_smp[i]),
      .out_valid(nz_valid),
      .out_smp  (nz_smp)
    );
    duc u_duc (
      .clk, .rst_n,
      .fcw      (ce_fcw),
      .in_valid (nz_valid),
      .in_smp   (nz_smp),
      .out_valid(ce_valid[i]),
      .out_smp  (ce_smp[i])
    );
  end

  // ---------------- user terminals ----------------
  for (genvar i = 0; i < N; i++) begin : g_ut
    logic  dd_valid, mf_valid, fs_valid;
    cplx_t dd_smp, mf_smp, fs_smp;
    ddc u_ddc (
      .clk, .rst_n,
      .fcw      (ce_fcw),
      .dec_log2 (dec_log2),
      .in_valid (ce_valid[i]),
      .in_smp   (ce_smp[i]),
      .out_valid(dd_valid),
      .out_smp  (dd_smp)
    );
    fir_filter #(.NTAPS(FIR_TAPS)) u_mf (
      .clk, .rst_n,
      .in_valid (dd_valid),
      .in_smp   (dd_smp),
      .out_valid(mf_valid),
      .out_smp  (mf_smp),
      .coef_we  (mf_we),
      .coef_idx (cfg_addr[$clog2(FIR_TAPS)-1:0]),
      .coef_data(cfg_wdata[15:0])
    );
    frame_sync #(.WIN_SYM(SYNC_WIN)) u_fs (
      .clk, .rst_n,
      .in_valid   (mf_valid),
      .in_smp     (mf_smp),
      .wh_idx     (wh_idx[i]),
      .scr_sosf   (scr_sosf),
      .threshold  (sync_threshold),
      .out_valid  (fs_valid),
      .out_smp    (fs_smp),
      .sync       (ut_sync[i]),
      .peak_corr  (ut_peak_corr[i]),
      .peak_metric(ut_peak_metric[i]),
      .sync_count (ut_sync_count[i])
    );
    symbol_timing #(.WIN_SYM(SYNC_WIN)) u_st (
      .clk, .rst_n,
      .in_valid (fs_valid),
      .in_smp   (fs_smp),
      .sync     (ut_sync[i]),
      .locked   (ut_locked[i]),
      .sym_valid(ut_sym_valid[i]),
      .sym      (ut_sym[i]),
      .sym_seg  (ut_sym_seg[i]),
      .sym_idx  (ut_sym_idx[i])
    );
    csi_estimator #(.N(N)) u_csi (
      .clk, .rst_n,
      .sym_valid (ut_sym_valid[i]),
      .sym       (ut_sym[i]),
      .sym_seg   (ut_sym_seg[i]),
      .sym_idx   (ut_sym_idx[i]),
      .wh_idx    (wh_idx),
      .scr_pilots(scr_pilots),
      .csi_valid (ut_csi_valid[i]),
      .csi       (ut_csi[i]),
      .csi_seg   (ut_csi_seg[i]),
      .csi_count (ut_csi_count[i])
    );
    phase_recovery u_pr (
      .clk, .rst_n,
      .sync     (ut_sync[i]),
      .mu_shift (pll_mu_shift),
      .in_valid (ut_sym_valid[i]),
      .in_sym   (ut_sym[i]),
      .in_seg   (ut_sym_seg[i]),
      .in_idx   (ut_sym_idx[i]),
      .out_valid(ut_pr_valid[i]),
      .out_sym  (ut_pr_sym[i]),
      .out_seg  (ut_pr_seg[i]),
      .out_idx  (ut_pr_idx[i]),
      .phase    (ut_phase[i])
    );
    soft_demod u_sd (
      .clk, .rst_n,
      .scale    (llr_scale),
      .in_valid (ut_pr_valid[i]),
      .in_sym   (ut_pr_sym[i]),
      .in_seg   (ut_pr_seg[i]),
      .llr_valid(ut_llr_valid[i]),
      .llr      (ut_llr[i]),
      .hard     (ut_hard[i])
    );
  end
endmodule

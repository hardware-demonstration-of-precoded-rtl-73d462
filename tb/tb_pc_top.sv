// End-to-end testbench of the closed-loop precoded forward link at the
// default sizes (6 beams, full superframe layout).
//
// The testbench plays the host: it loads raised-cosine taps for the four
// roll-off factors, a one-sample delay as IMUX and OMUX response, a mildly
// compressive TWTA table and a 6x6 channel matrix H with strong
// interference, and feeds every stream with payload bits that are a known
// function of the stream and the payload symbol number.
//   superframe 0 (W = I):  each terminal estimates its row of H from the
//                          P pilots; the estimate must match H.
//   then the host computes W = inv(H_est) and commits it (eq. W =
//   H^H (H H^H)^-1 for a square H);
//   superframe 2:          P2 pilots (precoded) must now show H*W = I, P
//                          pilots still H, and every terminal must receive its
//                          own payload bits without error, both from the
//                          symbols and from the phase-tracked LLRs, with the
//                          phase loop near zero; SLP is requested on the
//                          payload and must fall back.
//   superframe 3:          roll-off switched to 0.1; H*W = I must still hold.
// Mechanisms counted (each must occur): SOSF syncs, W commit applied at a
// superframe start, precoded and unprecoded slots, SLP fallback, payload
// underflow, TWTA entries above the first, H commit, phase-loop updates,
// clipped LLRs.
module tb_pc_top;
  import pc_pkg::*;
  localparam int N = NUM_STREAMS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0;
  logic [15:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic [7:0] modcod [N];
  logic [3:0] sffi [N];
  logic [7:0] wh_idx [N];
  logic scr_pilots = 1, scr_sosf = 1;
  logic [1:0] rank [N];
  logic [NUM_SEGS-1:0] prec_mask = 6'b101110, slp_mask = 6'b000000;
  logic [1:0] rolloff_sel = 0;
  logic bits_valid [N];
  logic [1:0] bits [N];
  logic bits_ready [N];
  logic [31:0] gw_fcw = 32'h0A3D_70A4, ce_fcw = 32'h051E_B852;
  logic [2:0] dec_log2 = 0;
  logic [15:0] awgn_amp = 16'd60;
  logic [47:0] sync_threshold = 48'd2500000;
  logic sf_start, w_applied, slp_fallback;
  logic [N-1:0] tx_precoded, underflow;
  seg_t tx_seg;
  logic [31:0] h_updates;
  logic ut_sync [N], ut_locked [N], ut_sym_valid [N], ut_csi_valid [N];
  cplx_t ut_sym [N], ut_csi [N][N], ut_peak_corr [N];
  seg_t ut_sym_seg [N], ut_csi_seg [N];
  logic [15:0] ut_sym_idx [N];
  logic [47:0] ut_peak_metric [N];
  logic [31:0] ut_sync_count [N], ut_csi_count [N];
  logic [3:0] pll_mu_shift = 4'd3;
  logic [15:0] llr_scale = 16'd4000;
  logic ut_pr_valid [N], ut_llr_valid [N];
  cplx_t ut_pr_sym [N];
  seg_t ut_pr_seg [N];
  logic [15:0] ut_pr_idx [N], ut_phase [N];
  logic signed [7:0] ut_llr [N][2];
  logic [1:0] ut_hard [N];

  pc_top dut (.*);

  int checks = 0, failures = 0;
  localparam int WATCHDOG = 400000;
  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- payload bits ----------------
  int pay_cnt [N];
  function automatic logic [1:0] pbits(int i, int k);
    return 2'(((k * 37 + i * 11) ^ (k >> 3)) & 3);
  endfunction
  int hold_bits = 0;   // stream 0 withholds bits for a few symbols at the start
  always_comb
    for (int i = 0; i < N; i++) begin
      bits[i] = pbits(i, pay_cnt[i]);
      bits_valid[i] = !(i == 0 && hold_bits > 0);
    end
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (sf_start) pay_cnt[i] <= 0;
      else if (bits_ready[i]) pay_cnt[i] <= pay_cnt[i] + 1;
    end
    if (bits_ready[0] && hold_bits > 0) hold_bits <= hold_bits - 1;
  end

  // ---------------- mechanism counters ----------------
  int n_applied = 0, n_prec = 0, n_unprec = 0, n_fallback = 0, n_under = 0, n_twta = 0;
  always @(posedge clk) if (rst_n) begin
    if (w_applied) n_applied++;
    if (dut.pre_valid && tx_precoded == '1) n_prec++;
    if (dut.pre_valid && tx_precoded == '0) n_unprec++;
    if (slp_fallback) n_fallback++;
    if (underflow != '0) n_under++;
    if (dut.g_ce_rx[0].u_twta.v_q && dut.g_ce_rx[0].u_twta.idx_q != '0) n_twta++;
  end

  // ---------------- terminal monitors ----------------
  int sf_no = 0;                          // superframe number seen by terminal 0
  real acc_re [2][N][N], acc_im [2][N][N]; // [0] = P, [1] = P2, summed estimates
  int  acc_n [2][N];
  int  rx_pay [N], bit_err [N], rx_checked [N];
  int  llr_pay [N], llr_err [N], llr_checked [N], n_pll_moves = 0, n_llr_clip = 0;
  logic [15:0] last_phase [N], pay_phase [N];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (ut_sync[i]) llr_pay[i] <= 0;
      else if (ut_llr_valid[i]) begin
        logic [1:0] want;
        want = pbits(i, llr_pay[i]);
        if (collect_data) begin
          llr_checked[i]++;
          pay_phase[i] <= ut_phase[i];
          if (ut_hard[i] != want || (ut_llr[i][0] < 0) != want[0] || (ut_llr[i][1] < 0) != want[1])
            llr_err[i]++;
        end
        if (ut_llr[i][0] == 8'sd127 || ut_llr[i][0] == -8'sd128) n_llr_clip++;
        llr_pay[i] <= llr_pay[i] + 1;
      end
      if (ut_phase[i] != last_phase[i]) n_pll_moves++;
      last_phase[i] <= ut_phase[i];
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (ut_sync[0]) sf_no <= sf_no + 1;
    for (int i = 0; i < N; i++) begin
      if (ut_sync[i]) rx_pay[i] <= 0;
      else if (ut_sym_valid[i] && ut_sym_seg[i] == SEG_PAYLOAD) begin
        logic [1:0] b, want;
        b = {ut_sym[i].im < 0, ut_sym[i].re < 0};
        want = pbits(i, rx_pay[i]);
        if (collect_data) begin
          rx_checked[i]++;
          if (b != want) bit_err[i] += (b[0] != want[0]) + (b[1] != want[1]);
        end
        rx_pay[i] <= rx_pay[i] + 1;
      end
      if (ut_csi_valid[i] && collect_csi) begin
        int f;
        f = (ut_csi_seg[i] == SEG_P) ? 0 : 1;
        for (int j = 0; j < N; j++) begin
          acc_re[f][i][j] += real'(ut_csi[i][j].re) / 16384.0;
          acc_im[f][i][j] += real'(ut_csi[i][j].im) / 16384.0;
        end
        acc_n[f][i]++;
      end
    end
  end
  bit collect_csi = 0, collect_data = 0;

  task automatic clear_acc();
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < N; i++) begin
        acc_n[f][i] = 0;
        for (int j = 0; j < N; j++) begin acc_re[f][i][j] = 0; acc_im[f][i][j] = 0; end
      end
    for (int i = 0; i < N; i++) begin
      bit_err[i] = 0; rx_checked[i] = 0; llr_err[i] = 0; llr_checked[i] = 0;
    end
  endtask

  task automatic wait_sf(int n);
    while (sf_no < n) @(posedge clk);
  endtask

  task automatic wr(int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 16'(addr); cfg_wdata = 32'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask
  function automatic int pack(real re, real im);
    int r, i;
    r = $rtoi(re * 16384.0 + (re >= 0 ? 0.5 : -0.5));
    i = $rtoi(im * 16384.0 + (im >= 0 ? 0.5 : -0.5));
    return ((r & 16'hffff) << 16) | (i & 16'hffff);
  endfunction

  function automatic real rc(real t, real b);
    real pi = 3.14159265358979;
    real s, c, d;
    s = (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
    d = 1.0 - (2.0 * b * t) ** 2;
    c = (d < 1e-9 && d > -1e-9) ? pi / 4.0 : $cos(pi * b * t) / d;
    return s * c;
  endfunction

  // ---------------- channel and its inverse ----------------
  real h_re [N][N], h_im [N][N];
  real w_re [N][N], w_im [N][N];

  // Gauss-Jordan inversion of the estimated matrix
  task automatic invert(input real ar [N][N], input real ai [N][N]);
    real mr [N][2*N], mi [N][2*N];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < 2 * N; j++) begin
        mr[i][j] = (j < N) ? ar[i][j] : ((j - N == i) ? 1.0 : 0.0);
        mi[i][j] = (j < N) ? ai[i][j] : 0.0;
      end
    for (int c = 0; c < N; c++) begin
      real pr, pi, d;
      pr = mr[c][c]; pi = mi[c][c]; d = pr * pr + pi * pi;
      for (int j = 0; j < 2 * N; j++) begin   // row c /= pivot
        real xr, xi;
        xr = mr[c][j]; xi = mi[c][j];
        mr[c][j] = (xr * pr + xi * pi) / d;
        mi[c][j] = (xi * pr - xr * pi) / d;
      end
      for (int r = 0; r < N; r++) if (r != c) begin
        real fr, fi;
        fr = mr[r][c]; fi = mi[r][c];
        for (int j = 0; j < 2 * N; j++) begin
          mr[r][j] -= fr * mr[c][j] - fi * mi[c][j];
          mi[r][j] -= fr * mi[c][j] + fi * mr[c][j];
        end
      end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin w_re[i][j] = mr[i][j + N]; w_im[i][j] = mi[i][j + N]; end
  endtask

  task automatic check_rows(int f, bit want_identity, real tol, string what);
    real worst;
    worst = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (acc_n[f][i] < ((f == 0) ? BLOCKS * FRAMES : FRAMES)) begin failures++; $display("FAIL %s: terminal %0d has %0d estimates", what, i, acc_n[f][i]); continue; end
      for (int j = 0; j < N; j++) begin
        real er, ei, tr, ti, e;
        er = acc_re[f][i][j] / acc_n[f][i];
        ei = acc_im[f][i][j] / acc_n[f][i];
        tr = want_identity ? ((i == j) ? 1.0 : 0.0) : h_re[i][j];
        ti = want_identity ? 0.0 : h_im[i][j];
        e = $sqrt((er - tr) ** 2 + (ei - ti) ** 2);
        if (e > worst) worst = e;
        checks++;
        if (e > tol) begin
          failures++;
          $display("FAIL %s [%0d][%0d] = (%f,%f), expected (%f,%f)", what, i, j, er, ei, tr, ti);
        end
      end
    end
    $display("%s: worst error %f (tolerance %f)", what, worst, tol);
  endtask

  // ---------------- scenario ----------------
  real her [N][N], hei [N][N];
  initial begin
    int t0;
    wh_idx = '{8'd12, 8'd8, 8'd2, 8'd3, 8'd4, 8'd5};
    for (int i = 0; i < N; i++) begin
      modcod[i] = 8'd1; sffi[i] = 4'd2; rank[i] = 2'd3; pay_cnt[i] = 0;
      rx_pay[i] = 0;
    end
    hold_bits = 5;
    clear_acc();
    // channel: strong beams with interference of 0.15 to 0.3 from neighbours
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real m, p;
        m = (i == j) ? 0.85 + 0.1 * ($urandom % 100) / 100.0 : 0.15 + 0.15 * ($urandom % 100) / 100.0;
        p = 6.2831853 * ($urandom % 1000) / 1000.0;
        h_re[i][j] = m * $cos(p); h_im[i][j] = m * $sin(p);
      end
    repeat (4) @(posedge clk);
    rst_n = 1;
    // host configuration
    for (int b = 0; b < 4; b++) begin
      real beta;
      beta = (b == 0) ? 0.2 : (b == 1) ? 0.15 : (b == 2) ? 0.1 : 0.05;
      for (int k = 0; k < 32; k++) begin
        real v;
        v = rc((k - 16) / 4.0, beta);
        wr(16'h1000 + 64 * b + k, $rtoi(v * 16384.0 + (v >= 0 ? 0.5 : -0.5)));
      end
    end
    wr(16'h2000, 0); wr(16'h2001, 16384);     // IMUX: one-sample delay
    wr(16'h2100, 0); wr(16'h2101, 16384);     // OMUX: one-sample delay
    for (int a = 0; a < 64; a++) begin
      real r, rs, g, ph;
      rs = 46000.0;
      r = $sqrt((a + 0.5) * 33554432.0);
      g = 1.0 / (1.0 + (r / rs) ** 2);
      ph = 0.3 * (r / rs) ** 2 / (1.0 + (r / rs) ** 2);
      wr(16'h3000 + a, ((($rtoi(g * $cos(ph) * 8192.0)) & 16'hffff) << 16) | ($rtoi(g * $sin(ph) * 8192.0) & 16'hffff));
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) wr(16'h0200 + 8 * i + j, pack(h_re[i][j], h_im[i][j]));
    wr(16'h0300, 0);
    t0 = $time;

    // superframe 0: estimate H (W = identity)
    wait_sf(1);
    $display("first sync at %0t", $time);
    collect_csi = 1;
    wait_sf(2);
    collect_csi = 0;
    check_rows(0, 0, 0.02, "H estimate from P pilots, W = I");
    check_rows(1, 0, 0.02, "P2 estimate with W = I");
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        her[i][j] = acc_re[0][i][j] / acc_n[0][i];
        hei[i][j] = acc_im[0][i][j] / acc_n[0][i];
      end
    // host: zero forcing from the estimate, commit (used from the next superframe)
    invert(her, hei);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) wr(16'h0000 + 8 * i + j, pack(w_re[i][j], w_im[i][j]));
    wr(16'h0100, 0);
    clear_acc();
    // superframe 2: precoded
    wait_sf(3);
    slp_mask = 6'b100000;
    collect_csi = 1; collect_data = 1;
    wait_sf(4);
    collect_csi = 0; collect_data = 0;
    check_rows(1, 1, 0.05, "effective channel H*W from P2 pilots");
    check_rows(0, 0, 0.02, "H from unprecoded P pilots while precoding");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (bit_err[i] != 0 || rx_checked[i] != BLOCKS * FRAMES * PAY_LEN) begin
        failures++;
        $display("FAIL terminal %0d: %0d bit errors in %0d symbols", i, bit_err[i], rx_checked[i]);
      end
    end
    for (int i = 0; i < N; i++) begin
      int ph;
      checks++;
      if (llr_err[i] != 0 || llr_checked[i] != BLOCKS * FRAMES * PAY_LEN) begin
        failures++;
        $display("FAIL terminal %0d: %0d LLR/hard-bit errors in %0d symbols", i, llr_err[i], llr_checked[i]);
      end
      // after zero forcing the residual carrier phase is near zero
      ph = int'(signed'(pay_phase[i]));
      checks++;
      if (ph > 546 || ph < -546) begin
        failures++; $display("FAIL terminal %0d residual phase word %0d", i, ph);
      end
    end
    $display("payload: %0d symbols per terminal checked, bit errors %0d %0d %0d %0d %0d %0d",
             rx_checked[0], bit_err[0], bit_err[1], bit_err[2], bit_err[3], bit_err[4], bit_err[5]);
    // superframe 3: other roll-off
    clear_acc();
    slp_mask = 6'b000000;
    rolloff_sel = 2'd2;
    collect_csi = 1;
    wait_sf(5);
    collect_csi = 0;
    check_rows(1, 1, 0.05, "H*W with roll-off 0.1");

    // mechanisms
    $display("mechanisms: syncs=%0d W applied=%0d precoded slots=%0d unprecoded slots=%0d SLP fallbacks=%0d underflows=%0d TWTA compressed samples=%0d H commits=%0d phase-loop steps=%0d LLR clips=%0d",
             ut_sync_count[0], n_applied, n_prec, n_unprec, n_fallback, n_under, n_twta, h_updates,
             n_pll_moves, n_llr_clip);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (ut_sync_count[i] < 5) begin failures++; $display("FAIL terminal %0d syncs %0d", i, ut_sync_count[i]); end
    end
    checks++; if (n_applied == 0)  begin failures++; $display("FAIL no W commit applied"); end
    checks++; if (n_prec == 0)     begin failures++; $display("FAIL no precoded slot"); end
    checks++; if (n_unprec == 0)   begin failures++; $display("FAIL no unprecoded slot"); end
    checks++; if (n_fallback == 0) begin failures++; $display("FAIL no SLP fallback"); end
    checks++; if (n_under == 0)    begin failures++; $display("FAIL no underflow"); end
    checks++; if (n_twta == 0)     begin failures++; $display("FAIL TWTA never left the first entry"); end
    checks++; if (n_pll_moves == 0) begin failures++; $display("FAIL phase loop never moved"); end
    checks++; if (n_llr_clip == 0)  begin failures++; $display("FAIL LLR never clipped"); end
    checks++; if (h_updates != 1)  begin failures++; $display("FAIL H commits %0d", h_updates); end
    $display("cycles=%0d", ($time - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the precoder: random W, symbols, ranks and masks;
// output compared with a reference model of x = W*s over the participating
// streams, including the one-clock latency and the commit at the first SOSF
// symbol.
module tb_precoder;
  import pc_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  cplx_t in_sym [N];
  seg_t in_seg = SEG_PAYLOAD;
  logic [1:0] rank [N];
  logic [NUM_SEGS-1:0] prec_mask = 6'b101110, slp_mask = '0;
  logic w_we = 0, w_commit = 0;
  logic [2:0] w_row = 0, w_col = 0;
  cplx_t w_data = CPLX_ZERO;
  logic out_valid, slp_fallback, w_applied;
  cplx_t out_sym [N];
  seg_t out_seg;
  logic [N-1:0] out_precoded;
  int checks = 0, failures = 0;

  precoder #(.N(N)) dut (.*);

  // reference state
  int wr_re [N][N], wr_im [N][N];   // active W in the model
  int ws_re [N][N], ws_im [N][N];   // written W
  int n_fallback = 0, n_applied = 0;

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction
  function automatic int satr(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_w();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ws_re[i][j] = rnd(-8192, 8192);
        ws_im[i][j] = rnd(-8192, 8192);
        @(negedge clk);
        w_we = 1; w_row = 3'(i); w_col = 3'(j);
        w_data = '{re: 16'(ws_re[i][j]), im: 16'(ws_im[i][j])};
      end
    @(negedge clk) w_we = 0;
  endtask

  task automatic slot(seg_t s, logic [1:0] rk [N]);
    logic part [N];
    longint er, ei;
    int exp_re [N], exp_im [N];
    logic want_fb;
    @(negedge clk);
    in_valid = 1; in_seg = s; rank = rk;
    for (int k = 0; k < N; k++) in_sym[k] = '{re: 16'(rnd(-3000, 3000)), im: 16'(rnd(-3000, 3000))};
    want_fb = 0;
    for (int k = 0; k < N; k++) begin
      part[k] = prec_mask[s] && (rk[k] == 1 || rk[k] == 3);
      if (part[k] && rk[k] == 3 && slp_mask[s]) want_fb = 1;
    end
    for (int i = 0; i < N; i++) begin
      if (!part[i]) begin
        exp_re[i] = int'(in_sym[i].re); exp_im[i] = int'(in_sym[i].im);
      end else begin
        er = 0; ei = 0;
        for (int j = 0; j < N; j++) if (part[j]) begin
          er += longint'(in_sym[j].re) * wr_re[i][j] - longint'(in_sym[j].im) * wr_im[i][j];
          ei += longint'(in_sym[j].re) * wr_im[i][j] + longint'(in_sym[j].im) * wr_re[i][j];
        end
        exp_re[i] = satr((er + 8192) >>> 14);
        exp_im[i] = satr((ei + 8192) >>> 14);
      end
    end
    @(posedge clk); #1;
    in_valid = 0;
    // one clock latency: result visible after this edge
    checks++;
    if (!out_valid || out_seg != s || out_precoded != {part[5], part[4], part[3], part[2], part[1], part[0]} || slp_fallback != want_fb) begin
      failures++;
      $display("FAIL flags seg=%0d valid=%0b prec=%b fb=%0b", s, out_valid, out_precoded, slp_fallback);
    end
    if (slp_fallback) n_fallback++;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(out_sym[i].re) != exp_re[i] || int'(out_sym[i].im) != exp_im[i]) begin
        failures++;
        $display("FAIL seg=%0d out[%0d]=(%0d,%0d) exp=(%0d,%0d)", s, i, out_sym[i].re, out_sym[i].im, exp_re[i], exp_im[i]);
      end
    end
  endtask

  logic [1:0] rk [N];
  initial begin
    for (int i = 0; i < N; i++) begin
      in_sym[i] = CPLX_ZERO; rank[i] = 2'd1;
      for (int j = 0; j < N; j++) begin
        wr_re[i][j] = (i == j) ? 16384 : 0; wr_im[i][j] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // identity W after reset
    for (int k = 0; k < N; k++) rk[k] = 2'd1;
    slot(SEG_PAYLOAD, rk);
    // new W, commit requested mid-superframe: must not apply before SOSF
    write_w();
    @(negedge clk) w_commit = 1;
    @(negedge clk) w_commit = 0;
    slot(SEG_PAYLOAD, rk);
    slot(SEG_P2, rk);
    // first SOSF slot: still old W (SOSF not precoded anyway); then new W
    slot(SEG_SOSF, rk);
    checks++;
    if (!w_applied) begin failures++; $display("FAIL w_applied missing"); end
    else n_applied++;
    wr_re = ws_re; wr_im = ws_im;
    slot(SEG_SOSF, rk);
    // random slots with random ranks, masks and segments
    for (int t = 0; t < 400; t++) begin
      seg_t s;
      s = seg_t'(rnd(0, 5));
      for (int k = 0; k < N; k++) rk[k] = 2'(rnd(0, 3));
      if (t % 50 == 0) begin prec_mask = 6'($urandom); slp_mask = 6'($urandom); end
      slot(s, rk);
    end
    // second matrix with saturation-size values
    write_w();
    @(negedge clk) w_commit = 1;
    @(negedge clk) w_commit = 0;
    slot(SEG_PAYLOAD, rk);
    slot(SEG_SOSF, rk);
    wr_re = ws_re; wr_im = ws_im;
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k < N; k++) rk[k] = 2'(rnd(0, 3));
      slot(seg_t'(rnd(1, 5)), rk);
    end
    checks++;
    if (n_fallback == 0) begin failures++; $display("FAIL no SLP fallback seen"); end
    $display("SLP fallbacks=%0d W applies=%0d", n_fallback, n_applied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the SOSF frame synchroniser.  A stream of random
// QPSK symbols at OSF samples per symbol (full amplitude on the symbol
// instant, half amplitude on the other phases) carries, at known positions,
// the scrambled Walsh-Hadamard SOSF of the terminal scaled by a complex gain,
// plus the SOSF of an interfering stream with another row.  Checks that sync
// pulses exactly WIN_SYM*OSF samples after the last SOSF symbol instant, once
// per SOSF, that peak_corr equals gain*SYM_A*(1+j), that nothing is detected
// when the threshold is above the peak, and the sync counter.
module tb_frame_sync;
  import pc_pkg::*;
  localparam int L = 256, WS = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, sync, scr_sosf = 1;
  cplx_t in_smp = CPLX_ZERO, out_smp, peak_corr;
  logic [7:0] wh_idx = 8'd12;
  logic [47:0] threshold = 48'd2000000, peak_metric;
  logic [31:0] sync_count;
  int checks = 0, failures = 0;

  frame_sync #(.L(L), .WIN_SYM(WS)) dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lfsr_bit(int n);
    int s;
    s = 127;
    for (int k = 0; k < n; k++) s = ((s << 1) & 127) | (((s >> 6) ^ (s >> 5)) & 1);
    return s & 1;
  endfunction

  int smp_no = 0;          // index of the sample being presented
  int expect_sync [$];     // sample numbers at which sync must be seen
  int n_sync = 0;
  int g_re = 11000, g_im = -6000;   // gain * 2**14

  // monitor: sync is registered with the sample it refers to
  int out_no = -1;
  initial begin
    forever begin
      @(posedge clk); #1;
      if (out_valid) out_no++;
      if (sync) begin
        n_sync++;
        checks++;
        if (expect_sync.size() == 0 || expect_sync[0] != out_no) begin
          failures++;
          $display("FAIL sync at sample %0d, expected %0d", out_no, expect_sync.size() ? expect_sync[0] : -1);
        end else begin
          int er, ei;
          // gain * A*(1+j) = A*((gr - gi) + j(gr + gi))
          er = ((g_re - g_im) * SYM_A) >>> 14; ei = ((g_re + g_im) * SYM_A) >>> 14;
          checks++;
          if (int'(peak_corr.re) - er > 4 || er - int'(peak_corr.re) > 4 || int'(peak_corr.im) - ei > 4 || ei - int'(peak_corr.im) > 4) begin
            failures++;
            $display("FAIL peak_corr (%0d,%0d) exp (%0d,%0d)", peak_corr.re, peak_corr.im, er, ei);
          end
        end
        if (expect_sync.size()) void'(expect_sync.pop_front());
      end
    end
  end

  task automatic send_sym(int re, int im);
    for (int p = 0; p < OSF; p++) begin
      @(negedge clk);
      in_valid = 1;
      in_smp = (p == 0) ? '{re: 16'(re), im: 16'(im)} : '{re: 16'(re / 2), im: 16'(im / 2)};
      smp_no++;
    end
  endtask

  task automatic payload(int n);
    for (int k = 0; k < n; k++)
      send_sym(($urandom % 2) ? 1500 : -1500, ($urandom % 2) ? 1500 : -1500);
  endtask

  task automatic sosf(bit detect, bit scr);
    for (int n = 0; n < L; n++) begin
      int c, ci, sr, si, xr, xi;
      c  = (($countones(12 & n) & 1) ^ (scr & lfsr_bit(n))) ? -SYM_A : SYM_A;
      ci = (($countones(5 & n) & 1) ^ lfsr_bit(n)) ? -SYM_A : SYM_A;
      // own SOSF through the gain: c*(1+j)*g, interferer c_i*(1+j)*0.3
      sr = (c * (g_re - g_im)) >>> 14;
      si = (c * (g_re + g_im)) >>> 14;
      xr = (ci * 4915) >>> 14; xi = xr;
      if (n == L - 1 && detect) expect_sync.push_back(smp_no + WS * OSF);
      send_sym(sr + xr, si + xi);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    payload(300);
    sosf(1, 1);
    payload(500);
    sosf(1, 1);
    payload(400);
    threshold = 48'd200000000;
    sosf(0, 1);        // peak below the threshold
    payload(300);
    threshold = 48'd2000000;
    sosf(0, 0);        // unscrambled SOSF while the reference is scrambled
    payload(300);
    scr_sosf = 0;
    sosf(1, 0);        // the reference follows the scramble flag
    payload(100);
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (expect_sync.size() != 0 || sync_count != 3) begin
      failures++; $display("FAIL pending=%0d count=%0d", expect_sync.size(), sync_count);
    end
    $display("syncs=%0d", n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

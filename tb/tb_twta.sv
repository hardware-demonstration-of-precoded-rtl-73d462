// Self-checking testbench of the TWTA model.  Checks unity gain after reset,
// then loads a Saleh-type AM/AM and AM/PM table (computed here) and compares
// each output with x * g[idx] for the power index of x, worked out
// independently; checks the two-clock latency and that drive levels spread
// over many table entries.
module tb_twta;
  import pc_pkg::*;
  localparam int AW = 6, NL = 64, GF = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, lut_we = 0;
  cplx_t in_smp = CPLX_ZERO, out_smp, lut_data = CPLX_ZERO;
  logic [AW-1:0] lut_addr = 0;
  int checks = 0, failures = 0;
  int g_re [NL], g_im [NL];
  bit used [NL];

  twta #(.LUT_AW(AW), .GFRAC(GF)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int satr(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  task automatic send(int re, int im);
    longint p, pr, pi;
    int idx, er, ei;
    p = longint'(re) * re + longint'(im) * im;
    idx = int'(p / (longint'(1) << 25));
    if (idx > NL - 1) idx = NL - 1;
    used[idx] = 1;
    pr = longint'(re) * g_re[idx] - longint'(im) * g_im[idx];
    pi = longint'(re) * g_im[idx] + longint'(im) * g_re[idx];
    er = satr((pr + 4096) >>> GF); ei = satr((pi + 4096) >>> GF);
    @(negedge clk);
    in_valid = 1; in_smp = '{re: 16'(re), im: 16'(im)};
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid) begin failures++; $display("FAIL early output"); end
    @(posedge clk); #1;
    checks++;
    if (!out_valid || int'(out_smp.re) != er || int'(out_smp.im) != ei) begin
      failures++;
      $display("FAIL in=(%0d,%0d) idx=%0d out=(%0d,%0d) exp=(%0d,%0d)", re, im, idx, out_smp.re, out_smp.im, er, ei);
    end
  endtask

  int n_used;
  initial begin
    for (int k = 0; k < NL; k++) begin g_re[k] = 1 << GF; g_im[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) send(int'($urandom % 60000) - 30000, int'($urandom % 60000) - 30000);
    // Saleh model, amplitude r in LSBs, saturation at rs
    for (int k = 0; k < NL; k++) begin
      real r, rs, a, ph, g;
      rs = 23170.0;
      r = $sqrt((k + 0.5) * 33554432.0);
      a = 2.0 * (r / rs) / (1.0 + (r / rs) ** 2) * rs;
      ph = 0.18 * 2.0 * (r / rs) ** 2 / (1.0 + (r / rs) ** 2);
      g = a / r;
      g_re[k] = int'($rtoi(g * $cos(ph) * 8192.0));
      g_im[k] = int'($rtoi(g * $sin(ph) * 8192.0));
      @(negedge clk);
      lut_we = 1; lut_addr = AW'(k); lut_data = '{re: 16'(g_re[k]), im: 16'(g_im[k])};
    end
    @(negedge clk) lut_we = 0;
    for (int k = 0; k < NL; k++) used[k] = 0;
    for (int t = 0; t < 600; t++) send(int'($urandom % 65536) - 32768, int'($urandom % 65536) - 32768);
    n_used = 0;
    for (int k = 0; k < NL; k++) n_used += used[k];
    checks++;
    if (n_used < 32) begin failures++; $display("FAIL only %0d table entries used", n_used); end
    $display("table entries exercised=%0d", n_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

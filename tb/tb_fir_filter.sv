// Self-checking testbench of the FIR filter: unit-impulse reset state, then
// random taps and samples with gaps in in_valid, compared with a direct
// convolution over the sample history; checks the one-clock latency.
module tb_fir_filter;
  import pc_pkg::*;
  localparam int NT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, coef_we = 0;
  cplx_t in_smp = CPLX_ZERO, out_smp;
  logic [3:0] coef_idx = 0;
  logic signed [15:0] coef_data = 0;
  int checks = 0, failures = 0;
  int taps [NT];
  int hist_re [$], hist_im [$];

  fir_filter #(.NTAPS(NT)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int satr(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  task automatic push_sample(int re, int im);
    longint sr, si;
    @(negedge clk);
    in_valid = 1;
    in_smp = '{re: 16'(re), im: 16'(im)};
    hist_re.push_front(re); hist_im.push_front(im);
    sr = 0; si = 0;
    for (int k = 0; k < NT; k++) if (k < hist_re.size()) begin
      sr += longint'(hist_re[k]) * taps[k];
      si += longint'(hist_im[k]) * taps[k];
    end
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || int'(out_smp.re) != satr((sr + 8192) >>> 14) || int'(out_smp.im) != satr((si + 8192) >>> 14)) begin
      failures++;
      $display("FAIL out=(%0d,%0d) exp=(%0d,%0d)", out_smp.re, out_smp.im, satr((sr + 8192) >>> 14), satr((si + 8192) >>> 14));
    end
    // gap
    repeat ($urandom % 3) begin
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid in gap"); end
    end
  endtask

  initial begin
    for (int k = 0; k < NT; k++) taps[k] = (k == 0) ? 16384 : 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) push_sample(int'($urandom % 20000) - 10000, int'($urandom % 20000) - 10000);
    for (int k = 0; k < NT; k++) begin
      @(negedge clk);
      taps[k] = int'($urandom % 16384) - 8192;
      coef_we = 1; coef_idx = 4'(k); coef_data = 16'(taps[k]);
    end
    @(negedge clk) coef_we = 0;
    for (int t = 0; t < 300; t++) push_sample(int'($urandom % 40000) - 20000, int'($urandom % 40000) - 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

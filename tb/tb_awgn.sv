// Self-checking testbench of the AWGN stage.  With amp = 0 the stream must
// pass unchanged (one-clock latency); with amp > 0 the added noise must have
// zero mean, per-component standard deviation amp/sqrt(3), uncorrelated I
// and Q, and a Gaussian-like shape (fraction within one sigma near 0.68).
module tb_awgn;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] amp = 0;
  logic in_valid = 0, out_valid;
  cplx_t in_smp = CPLX_ZERO, out_smp;
  int checks = 0, failures = 0;

  awgn dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum_i, sum_q, sq_i, sq_q, sx, sigma, m_i, s_i, s_q, rho;
    int nin, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      in_valid = 1; in_smp = '{re: 16'($urandom), im: 16'($urandom)};
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || out_smp != in_smp) begin failures++; $display("FAIL passthrough"); end
    end
    amp = 16'd3000;
    sigma = 3000.0 / $sqrt(3.0);
    n = 50000;
    sum_i = 0; sum_q = 0; sq_i = 0; sq_q = 0; sx = 0; nin = 0;
    @(negedge clk);
    in_valid = 1; in_smp = '{re: 16'sd1000, im: -16'sd500};
    for (int t = 0; t < n; t++) begin
      real di, dq;
      @(posedge clk); #1;
      di = real'(out_smp.re) - 1000.0;
      dq = real'(out_smp.im) + 500.0;
      sum_i += di; sum_q += dq; sq_i += di * di; sq_q += dq * dq; sx += di * dq;
      if (di < sigma && di > -sigma) nin++;
    end
    in_valid = 0;
    m_i = sum_i / n;
    s_i = $sqrt(sq_i / n - m_i * m_i);
    s_q = $sqrt(sq_q / n - (sum_q / n) ** 2);
    rho = (sx / n) / (s_i * s_q);
    $display("mean=(%f,%f) sigma=(%f,%f) expected %f rho=%f in1sigma=%f", m_i, sum_q / n, s_i, s_q, sigma, rho, real'(nin) / n);
    checks++; if (m_i > 30.0 || m_i < -30.0 || sum_q / n > 30.0 || sum_q / n < -30.0) begin failures++; $display("FAIL mean"); end
    checks++; if (s_i < 0.97 * sigma || s_i > 1.03 * sigma || s_q < 0.97 * sigma || s_q > 1.03 * sigma) begin failures++; $display("FAIL sigma"); end
    checks++; if (rho > 0.03 || rho < -0.03) begin failures++; $display("FAIL correlation"); end
    checks++; if (real'(nin) / n < 0.65 || real'(nin) / n > 0.71) begin failures++; $display("FAIL shape"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

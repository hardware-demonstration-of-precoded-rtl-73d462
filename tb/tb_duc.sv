// Self-checking testbench of the DUC: random samples at a fixed NCO frequency
// compared with x[n]*exp(j*2*pi*fcw*n/2**32) computed in real arithmetic
// (tolerance 10 LSB for the 16-bit phase and CORDIC rounding), and the
// latency of ITER+2 = 16 clocks.
module tb_duc;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] fcw = 32'h0A3D_70A4;   // 0.04 of the sample rate
  logic in_valid = 0, out_valid;
  cplx_t in_smp = CPLX_ZERO, out_smp;
  int checks = 0, failures = 0;
  real exp_re [$], exp_im [$];
  int cyc = 0, first_out = -1, first_in = -1;

  duc dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    forever begin
      @(posedge clk); #1;
      if (out_valid) begin
        real dr, di;
        if (first_out < 0) first_out = cyc;
        checks++;
        dr = real'(out_smp.re) - exp_re[0];
        di = real'(out_smp.im) - exp_im[0];
        if (dr > 10.0 || dr < -10.0 || di > 10.0 || di < -10.0) begin
          failures++;
          $display("FAIL out=(%0d,%0d) exp=(%f,%f)", out_smp.re, out_smp.im, exp_re[0], exp_im[0]);
        end
        void'(exp_re.pop_front()); void'(exp_im.pop_front());
      end
    end
  end

  initial begin
    longint ph;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ph = 0;
    for (int t = 0; t < 2000; t++) begin
      real a, xr, xi;
      @(negedge clk);
      in_valid = ($urandom % 3 != 0);
      xr = real'(int'($urandom % 40000) - 20000);
      xi = real'(int'($urandom % 40000) - 20000);
      in_smp = '{re: 16'($rtoi(xr)), im: 16'($rtoi(xi))};
      if (in_valid) begin
        if (first_in < 0) first_in = cyc;
        a = 2.0 * 3.14159265358979 * real'((ph >> 16) & 16'hffff) / 65536.0;
        exp_re.push_back(xr * $cos(a) - xi * $sin(a));
        exp_im.push_back(xr * $sin(a) + xi * $cos(a));
        ph = (ph + fcw) & 64'hffff_ffff;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    #1;
    checks++;
    if (first_out - first_in != 16 || exp_re.size() != 0) begin
      failures++; $display("FAIL latency %0d pending %0d", first_out - first_in, exp_re.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

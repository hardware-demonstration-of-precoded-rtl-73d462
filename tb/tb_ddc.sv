// Self-checking testbench of the DDC: NCO shift by -fcw with decimation
// factors 1, 2, 4 and 16, each output compared with the average of the
// rotated input samples computed in real arithmetic (tolerance 10 LSB), the
// output rate (one output per 2**dec_log2 inputs) and the restart on a
// decimation change.
module tb_ddc;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] fcw = 32'h1999_999A;   // 0.1 of the sample rate
  logic [2:0] dec_log2 = 0;
  logic in_valid = 0, out_valid;
  cplx_t in_smp = CPLX_ZERO, out_smp;
  int checks = 0, failures = 0;
  real exp_re [$], exp_im [$];
  int n_out = 0;

  ddc dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      @(posedge clk); #1;
      if (out_valid) begin
        real dr, di;
        n_out++;
        checks++;
        if (exp_re.size() == 0) begin failures++; $display("FAIL unexpected output"); end
        else begin
          dr = real'(out_smp.re) - exp_re[0];
          di = real'(out_smp.im) - exp_im[0];
          if (dr > 10.0 || dr < -10.0 || di > 10.0 || di < -10.0) begin
            failures++;
            $display("FAIL dec=%0d out=(%0d,%0d) exp=(%f,%f)", dec_log2, out_smp.re, out_smp.im, exp_re[0], exp_im[0]);
          end
          void'(exp_re.pop_front()); void'(exp_im.pop_front());
        end
      end
    end
  end

  longint ph = 0;
  task automatic run(int dl, int nout);
    real ar, ai;
    repeat (25) @(negedge clk);  // samples in flight finish in the old mode
    dec_log2 = 3'(dl);
    repeat (25) @(negedge clk);  // let the pipeline drain and the counter restart
    for (int k = 0; k < nout; k++) begin
      ar = 0; ai = 0;
      for (int m = 0; m < (1 << dl); m++) begin
        real a, xr, xi;
        @(negedge clk);
        in_valid = 1;
        xr = real'(int'($urandom % 30000) - 15000);
        xi = real'(int'($urandom % 30000) - 15000);
        in_smp = '{re: 16'($rtoi(xr)), im: 16'($rtoi(xi))};
        a = 2.0 * 3.14159265358979 * real'((ph >> 16) & 16'hffff) / 65536.0;
        ar += xr * $cos(a) - xi * $sin(a);
        ai += xr * $sin(a) + xi * $cos(a);
        ph = (ph - fcw) & 64'hffff_ffff;   // accumulator runs backwards
        @(negedge clk) in_valid = 1'b0;
      end
      exp_re.push_back(ar / (1 << dl)); exp_im.push_back(ai / (1 << dl));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 200);
    run(1, 100);
    run(2, 100);
    run(4, 30);
    repeat (30) @(posedge clk);
    #1;
    checks++;
    if (n_out != 430 || exp_re.size() != 0) begin failures++; $display("FAIL outputs=%0d pending=%0d", n_out, exp_re.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

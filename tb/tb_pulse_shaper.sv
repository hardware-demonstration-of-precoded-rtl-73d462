// Self-checking testbench of the pulse shaper.  Loads raised-cosine taps for
// the four roll-off factors (computed here with real arithmetic), sends random
// QPSK symbols every OSF clocks and checks each output sample against the
// polyphase sum over the symbol history, the OSF samples per symbol, zero ISI
// at the symbol instants (phase 0 sample equals the symbol delayed by SPAN/2)
// and the switch between roll-off banks.
module tb_pulse_shaper;
  import pc_pkg::*;
  localparam int SPAN = 8, NT = OSF * SPAN;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, coef_we = 0;
  cplx_t in_sym = CPLX_ZERO, out_smp;
  logic [1:0] rolloff_sel = 0, coef_bank = 0;
  logic [4:0] coef_idx = 0;
  logic signed [15:0] coef_data = 0;
  int checks = 0, failures = 0;
  int taps [4][NT];
  int sre [$], sim [$];
  real beta [4] = '{0.2, 0.15, 0.1, 0.05};

  pulse_shaper #(.SPAN(SPAN)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rc(real t, real b);
    real pi = 3.14159265358979;
    real s, c;
    s = (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
    if ((1.0 - (2.0 * b * t) ** 2) < 1e-9 && (1.0 - (2.0 * b * t) ** 2) > -1e-9) c = pi / 4.0;
    else c = $cos(pi * b * t) / (1.0 - (2.0 * b * t) ** 2);
    return s * c;
  endfunction

  int n_out = 0, n_zisi = 0;
  int exp_q [$][3];
  int exp_q_z [$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < NT; k++) begin
        taps[b][k] = int'($rtoi(rc((k - NT / 2) / real'(OSF), beta[b]) * 16384.0 + ((rc((k - NT / 2) / real'(OSF), beta[b]) >= 0) ? 0.5 : -0.5)));
        @(negedge clk);
        coef_we = 1; coef_bank = 2'(b); coef_idx = 5'(k); coef_data = 16'(taps[b][k]);
      end
    @(negedge clk) coef_we = 0;
    fork
      // checker: every valid output must match the next expected sample
      forever begin
        @(posedge clk); #1;
        if (out_valid) begin
          checks++;
          if (exp_q.size() == 0) begin
            failures++; $display("FAIL unexpected output");
          end else begin
            int er, ei, ph;
            er = exp_q[0][0]; ei = exp_q[0][1]; ph = exp_q[0][2];
            void'(exp_q.pop_front());
            if (int'(out_smp.re) != er || int'(out_smp.im) != ei) begin
              failures++;
              $display("FAIL out=(%0d,%0d) exp=(%0d,%0d)", out_smp.re, out_smp.im, er, ei);
            end else n_out++;
            if (ph == 0 && sre.size() > SPAN) begin
              checks++;
              if (er != exp_q_z[0]) begin failures++; $display("FAIL ISI at symbol instant"); end
              else n_zisi++;
            end
            if (ph == 0) void'(exp_q_z.pop_front());
          end
        end
      end
    join_none
    for (int t = 0; t < 600; t++) begin
      if (t == 300) begin
        // pause, then switch roll-off bank
        repeat (9) @(negedge clk);
        rolloff_sel = 2'd3;
      end
      @(negedge clk);
      in_valid = 1;
      in_sym = '{re: ($urandom % 2) ? 16'(SYM_A) : -16'(SYM_A), im: ($urandom % 2) ? 16'(SYM_A) : -16'(SYM_A)};
      sre.push_front(int'(in_sym.re)); sim.push_front(int'(in_sym.im));
      for (int p = 0; p < OSF; p++) begin
        longint er, ei;
        er = 0; ei = 0;
        for (int m = 0; m < SPAN; m++) if (m < sre.size()) begin
          er += longint'(sre[m]) * taps[rolloff_sel][m * OSF + p];
          ei += longint'(sim[m]) * taps[rolloff_sel][m * OSF + p];
        end
        exp_q.push_back('{int'((er + 8192) >>> 14), int'((ei + 8192) >>> 14), p});
      end
      exp_q_z.push_back(sre.size() > SPAN / 2 ? sre[SPAN / 2] : 0);
      @(negedge clk) in_valid = 0;
      repeat (OSF - 2) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (exp_q.size() != 0 || n_out != 600 * OSF) begin failures++; $display("FAIL missing outputs %0d", n_out); end
    $display("samples=%0d zero-ISI instants=%0d", n_out, n_zisi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

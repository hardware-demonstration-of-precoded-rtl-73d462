// Self-checking testbench of the fine phase tracker.  QPSK payload symbols of
// known bits are sent with a carrier phase offset and small noise, one symbol
// every four clocks as in the receiver.  Checks: 16-clock latency and tags
// carried with the symbol; no phase update on pilot segments; convergence of
// the phase estimate to the applied offset and of the symbols to the ideal
// constellation; clearing on sync; tracking of a slow phase ramp.
module tb_phase_recovery;
  import pc_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        sync = 0, in_valid = 0, out_valid;
  logic [3:0]  mu_shift = 4'd3;
  cplx_t       in_sym = CPLX_ZERO, out_sym;
  seg_t        in_seg = SEG_P2, out_seg;
  logic [15:0] in_idx = 0, out_idx, phase;
  int checks = 0, failures = 0;

  phase_recovery dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected tags and ideal symbols, in order
  seg_t        q_seg [$];
  logic [15:0] q_idx [$];
  int          q_re [$], q_im [$];
  time         q_t [$];
  bit          check_sym = 0;
  int          tol = 0, n_out = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    int er, ei;
    time t0;
    seg_t s; logic [15:0] ix;
    s = q_seg.pop_front(); ix = q_idx.pop_front();
    er = q_re.pop_front(); ei = q_im.pop_front(); t0 = q_t.pop_front();
    n_out++;
    checks++;
    if (out_seg != s || out_idx != ix) begin
      failures++; $display("FAIL tags %0d/%0d exp %0d/%0d", out_seg, out_idx, s, ix);
    end
    checks++;
    // captured on the posedge 5 time units after the push; 16 clocks later
    // the output is seen by this process one edge after it is set
    if ($time - t0 != 165) begin failures++; $display("FAIL latency %0t", $time - t0); end
    if (check_sym) begin
      checks++;
      if (int'(out_sym.re) - er > tol || er - int'(out_sym.re) > tol ||
          int'(out_sym.im) - ei > tol || ei - int'(out_sym.im) > tol) begin
        failures++;
        $display("FAIL symbol (%0d,%0d) exp (%0d,%0d)", out_sym.re, out_sym.im, er, ei);
      end
    end
  end

  task automatic send(seg_t s, real phi_deg);
    int br, bi, er, ei;
    real c, sn, xr, xi;
    br = int'($urandom % 2); bi = int'($urandom % 2);
    er = (br != 0) ? -SYM_A : SYM_A; ei = (bi != 0) ? -SYM_A : SYM_A;
    c = $cos(phi_deg * PI / 180.0); sn = $sin(phi_deg * PI / 180.0);
    xr = er * c - ei * sn + real'(int'($urandom % 61) - 30);
    xi = er * sn + ei * c + real'(int'($urandom % 61) - 30);
    @(negedge clk);
    in_valid = 1; in_seg = s; in_idx = in_idx + 1;
    in_sym = '{re: 16'(int'(xr)), im: 16'(int'(xi))};
    q_seg.push_back(s); q_idx.push_back(in_idx);
    q_re.push_back(er); q_im.push_back(ei); q_t.push_back($time);
    @(negedge clk); in_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  function automatic int phase_err(logic [15:0] ph, real deg);
    int e;
    e = int'(ph) - int'(deg / 360.0 * 65536.0);
    if (e > 32767) e -= 65536;
    if (e < -32768) e += 65536;
    return e < 0 ? -e : e;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pilots with a phase offset: rotated through with theta = 0, no update
    check_sym = 1; tol = 1200;
    for (int k = 0; k < 100; k++) send(SEG_P2, 25.0);
    repeat (30) @(negedge clk);
    checks++;
    if (phase != 0) begin failures++; $display("FAIL phase moved on pilots: %0d", phase); end
    // payload: acquire 25 degrees
    check_sym = 0;
    for (int k = 0; k < 150; k++) send(SEG_PAYLOAD, 25.0);
    checks++;
    if (phase_err(phase, 25.0) > 364) begin
      failures++; $display("FAIL phase %0d, expected about %0d", phase, int'(25.0 / 360.0 * 65536.0));
    end
    check_sym = 1; tol = 120;
    for (int k = 0; k < 200; k++) send(SEG_PAYLOAD, 25.0);
    // sync clears the estimate
    repeat (30) @(negedge clk);
    sync = 1; @(negedge clk); sync = 0;
    checks++;
    if (phase != 0) begin failures++; $display("FAIL sync did not clear phase: %0d", phase); end
    // slow ramp: 0.05 degree per symbol from -20 degrees
    check_sym = 0;
    for (int k = 0; k < 150; k++) send(SEG_PAYLOAD, -20.0 + 0.05 * k);
    check_sym = 1; tol = 200;
    for (int k = 150; k < 600; k++) send(SEG_PAYLOAD, -20.0 + 0.05 * k);
    checks++;
    if (phase_err(phase, -20.0 + 0.05 * 600) > 546) begin
      failures++; $display("FAIL ramp phase %0d", phase);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (q_seg.size() != 0 || n_out != 1050) begin
      failures++; $display("FAIL %0d outputs, %0d left", n_out, q_seg.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

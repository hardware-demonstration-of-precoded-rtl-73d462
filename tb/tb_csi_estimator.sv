// Self-checking testbench of the CSI estimator.  Builds P and P2 pilot fields
// as the sum of the six streams' scrambled Walsh-Hadamard pilots, each through
// its own random complex gain h_j, separated by payload symbols, and checks
// that every estimate row equals the gains (to 8 LSB of Q14, the stimulus being rounded per symbol), that csi_seg
// tells P from P2, that payload does not disturb the estimate and that the
// estimate comes one clock after the last pilot.
module tb_csi_estimator;
  import pc_pkg::*;
  localparam int N = 6, LP = 32, L2 = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sym_valid = 0, scr_pilots = 1, csi_valid;
  cplx_t sym = CPLX_ZERO, csi [N];
  seg_t sym_seg = SEG_PAYLOAD, csi_seg;
  logic [15:0] sym_idx = 0;
  logic [7:0] wh_idx [N] = '{8'd12, 8'd8, 8'd2, 8'd3, 8'd4, 8'd5};
  logic [31:0] csi_count;
  int checks = 0, failures = 0;

  csi_estimator #(.N(N), .L_P(LP), .L_P2(L2)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  int hr [N], hi [N];
  task automatic field(seg_t s, int len);
    for (int j = 0; j < N; j++) begin
      hr[j] = int'($urandom % 24000) - 12000;
      hi[j] = int'($urandom % 24000) - 12000;
    end
    for (int n = 0; n < len; n++) begin
      int rr, ri;
      rr = 0; ri = 0;
      for (int j = 0; j < N; j++) begin
        int a;
        a = (($countones((int'(wh_idx[j]) % len) & n) & 1) ^ (scr_pilots & lfsr_bit(n))) ? -SYM_A : SYM_A;
        // a*(1+j)*h = a*((hr - hi) + j(hr + hi))
        rr += (a * (hr[j] - hi[j])) >>> 14;
        ri += (a * (hr[j] + hi[j])) >>> 14;
      end
      @(negedge clk);
      sym_valid = 1; sym_seg = s; sym_idx = 16'(n);
      sym = '{re: 16'(rr), im: 16'(ri)};
      @(posedge clk); #1;
      sym_valid = 0;
      checks++;
      if (csi_valid != (n == len - 1)) begin failures++; $display("FAIL csi_valid at n=%0d", n); end
      if (n == len - 1 && csi_valid) begin
        checks++;
        if (csi_seg != s) begin failures++; $display("FAIL csi_seg"); end
        for (int j = 0; j < N; j++) begin
          checks++;
          if (int'(csi[j].re) - hr[j] > 8 || hr[j] - int'(csi[j].re) > 8 || int'(csi[j].im) - hi[j] > 8 || hi[j] - int'(csi[j].im) > 8) begin
            failures++;
            $display("FAIL h[%0d]=(%0d,%0d) exp (%0d,%0d)", j, csi[j].re, csi[j].im, hr[j], hi[j]);
          end
        end
      end
    end
  endtask

  task automatic pay(int len);
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      sym_valid = 1; sym_seg = SEG_PAYLOAD; sym_idx = 16'(n);
      sym = '{re: 16'($urandom), im: 16'($urandom)};
      @(posedge clk); #1;
      sym_valid = 0;
      checks++;
      if (csi_valid) begin failures++; $display("FAIL estimate during payload"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      pay(20);
      field(SEG_P, LP);
      pay(7);
      field(SEG_P2, L2);
      if (r == 5) scr_pilots = 0;
    end
    checks++;
    if (csi_count != 20) begin failures++; $display("FAIL count %0d", csi_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

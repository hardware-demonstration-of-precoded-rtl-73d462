// Self-checking testbench of the MIMO channel emulator: identity after reset,
// shadow writes that stay inactive until h_commit, random complex matrices
// and back-to-back sample vectors compared with y = H*x from a reference
// model, one-clock latency and the update counter.
module tb_mimo_channel;
  import pc_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, h_we = 0, h_commit = 0;
  cplx_t in_smp [N], out_smp [N], h_data = CPLX_ZERO;
  logic [2:0] h_row = 0, h_col = 0;
  logic [31:0] h_updates;
  int checks = 0, failures = 0;
  int hr [N][N], hi [N][N];
  int exp_re [$][N], exp_im [$][N];

  mimo_channel #(.N(N)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int satr(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  // checker
  initial begin
    forever begin
      @(posedge clk); #1;
      if (out_valid) begin
        checks++;
        if (exp_re.size() == 0) begin failures++; $display("FAIL unexpected"); end
        else begin
          for (int i = 0; i < N; i++)
            if (int'(out_smp[i].re) != exp_re[0][i] || int'(out_smp[i].im) != exp_im[0][i]) begin
              failures++;
              $display("FAIL y[%0d]=(%0d,%0d) exp=(%0d,%0d)", i, out_smp[i].re, out_smp[i].im, exp_re[0][i], exp_im[0][i]);
            end
          void'(exp_re.pop_front()); void'(exp_im.pop_front());
        end
      end
    end
  end

  task automatic burst(int len);
    for (int t = 0; t < len; t++) begin
      int er [N], ei [N];
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      for (int j = 0; j < N; j++) in_smp[j] = '{re: 16'(int'($urandom % 12000) - 6000), im: 16'(int'($urandom % 12000) - 6000)};
      if (in_valid) begin
        for (int i = 0; i < N; i++) begin
          longint sr, si;
          sr = 0; si = 0;
          for (int j = 0; j < N; j++) begin
            sr += longint'(in_smp[j].re) * hr[i][j] - longint'(in_smp[j].im) * hi[i][j];
            si += longint'(in_smp[j].re) * hi[i][j] + longint'(in_smp[j].im) * hr[i][j];
          end
          er[i] = satr((sr + 8192) >>> 14); ei[i] = satr((si + 8192) >>> 14);
        end
        exp_re.push_back(er); exp_im.push_back(ei);
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      in_smp[i] = CPLX_ZERO;
      for (int j = 0; j < N; j++) begin hr[i][j] = (i == j) ? 16384 : 0; hi[i][j] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(50);
    for (int m = 0; m < 3; m++) begin
      int nr [N][N], ni [N][N];
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          nr[i][j] = (i == j) ? 16384 - int'($urandom % 2000) : int'($urandom % 8000) - 4000;
          ni[i][j] = int'($urandom % 8000) - 4000;
          @(negedge clk);
          h_we = 1; h_row = 3'(i); h_col = 3'(j); h_data = '{re: 16'(nr[i][j]), im: 16'(ni[i][j])};
        end
      @(negedge clk) h_we = 0;
      burst(30);            // old matrix still active
      @(negedge clk) h_commit = 1;
      @(negedge clk) h_commit = 0;
      hr = nr; hi = ni;
      burst(200);
    end
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (h_updates != 3 || exp_re.size() != 0) begin failures++; $display("FAIL updates=%0d pending=%0d", h_updates, exp_re.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

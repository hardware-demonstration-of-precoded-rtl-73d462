// Self-checking testbench of the QPSK soft demapper.  Random symbols with
// random segment tags and scales are sent; every PAYLOAD symbol must give,
// one clock later, LLRs equal to floor(y * scale / 2**16) clipped to 8 bits,
// and hard bits equal to the signs.  Other segments must give no output.
// Also checks that clipping at both ends happens.
module tb_soft_demod;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid = 0, llr_valid;
  logic [15:0] scale = 0;
  cplx_t       in_sym = CPLX_ZERO;
  seg_t        in_seg = SEG_SOSF;
  logic signed [7:0] llr [2];
  logic [1:0]  hard;
  int checks = 0, failures = 0, n_clip_hi = 0, n_clip_lo = 0, n_pay = 0;

  soft_demod dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_llr(int y, int s);
    longint p;
    p = longint'(y) * s;
    p = (p >= 0) ? p / 65536 : -((-p + 65535) / 65536);  // floor
    if (p > 127) return 127;
    if (p < -128) return -128;
    return int'(p);
  endfunction

  initial begin
    int yr, yi, s, er, ei;
    bit pay;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      yr = int'($urandom % 8192) - 4096;
      yi = int'($urandom % 8192) - 4096;
      s  = int'($urandom % 8192);
      pay = ($urandom % 3) != 0;
      @(negedge clk);
      in_valid = 1;
      in_sym = '{re: 16'(yr), im: 16'(yi)};
      scale = 16'(s);
      in_seg = pay ? SEG_PAYLOAD : seg_t'($urandom % 5);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (llr_valid != pay) begin failures++; $display("FAIL llr_valid=%0d for payload=%0d", llr_valid, pay); end
      if (pay) begin
        n_pay++;
        er = ref_llr(yr, s); ei = ref_llr(yi, s);
        if (er == 127 || ei == 127) n_clip_hi++;
        if (er == -128 || ei == -128) n_clip_lo++;
        checks++;
        if (int'(llr[0]) != er || int'(llr[1]) != ei) begin
          failures++; $display("FAIL y=(%0d,%0d) scale=%0d llr=(%0d,%0d) exp=(%0d,%0d)", yr, yi, s, llr[0], llr[1], er, ei);
        end
        checks++;
        if (hard != {yi < 0, yr < 0}) begin failures++; $display("FAIL hard %b", hard); end
      end
    end
    checks++;
    if (n_clip_hi == 0 || n_clip_lo == 0 || n_pay < 2000) begin
      failures++; $display("FAIL coverage: clip+ %0d clip- %0d payload %0d", n_clip_hi, n_clip_lo, n_pay);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

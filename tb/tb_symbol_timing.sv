// Self-checking testbench of the symbol timing / deframer at a reduced layout.
// Samples carry their own index; sync pulses are given at chosen samples (two
// different phases).  Checks that nothing is emitted before the first sync,
// that exactly every OSF-th sample from the sync sample on is emitted, and
// that segment and index follow the layout starting at SFFI symbol WIN_SYM-1,
// including the wrap into the next superframe and the re-alignment on a
// second sync.
module tb_symbol_timing;
  import pc_pkg::*;
  localparam int WS = 4, LS = 8, LF = 8, LH = 8, L2 = 4, LP = 4, LY = 6, NB = 2, NF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, sync = 0, locked, sym_valid;
  cplx_t in_smp = CPLX_ZERO, sym;
  seg_t sym_seg;
  logic [15:0] sym_idx;
  int checks = 0, failures = 0;

  symbol_timing #(.WIN_SYM(WS), .L_SOSF(LS), .L_SFFI(LF), .L_PLH(LH), .L_P2(L2), .L_P(LP),
                  .L_PAY(LY), .N_BLOCKS(NB), .N_FRAMES(NF)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  seg_t lay_seg [$];
  int   lay_idx [$];
  task automatic push(seg_t s, int len, int from);
    for (int n = from; n < len; n++) begin lay_seg.push_back(s); lay_idx.push_back(n); end
  endtask
  task automatic build();
    lay_seg.delete(); lay_idx.delete();
    push(SEG_SFFI, LF, WS - 1);
    for (int r = 0; r < 3; r++) begin
      for (int f = 0; f < NF; f++) begin
        push(SEG_PLH, LH, 0); push(SEG_P2, L2, 0);
        for (int b = 0; b < NB; b++) begin push(SEG_PAYLOAD, LY, 0); push(SEG_P, LP, 0); end
      end
      push(SEG_SOSF, LS, 0); push(SEG_SFFI, LF, 0);
    end
  endtask

  int next_emit = -1, k = 0, n_emit = 0;
  int sync_at [2] = '{37, 402};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      in_valid = 1;
      in_smp = '{re: 16'(t), im: -16'(t)};
      sync = (t == sync_at[0] || t == sync_at[1]);
      if (sync) begin build(); next_emit = t; k = 0; end
      @(posedge clk); #1;
      in_valid = 0; sync = 0;
      checks++;
      if (t == next_emit) begin
        if (!sym_valid || int'(sym.re) != t || sym_seg != lay_seg[k] || int'(sym_idx) != lay_idx[k] || !locked) begin
          failures++;
          $display("FAIL t=%0d valid=%0b sym=%0d seg=%0d/%0d idx=%0d/%0d", t, sym_valid, sym.re, sym_seg, lay_seg[k], sym_idx, lay_idx[k]);
        end else n_emit++;
        k++;
        next_emit = t + OSF;
      end else if (sym_valid) begin
        failures++;
        $display("FAIL unexpected symbol at t=%0d", t);
      end
      if ($urandom % 5 == 0) @(negedge clk);   // gaps in the sample stream
    end
    checks++;
    if (n_emit < 180) begin failures++; $display("FAIL only %0d symbols", n_emit); end
    $display("symbols=%0d", n_emit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

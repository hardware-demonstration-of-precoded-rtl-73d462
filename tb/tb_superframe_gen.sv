// Self-checking testbench of the superframe generator at a reduced layout.
// A reference model rebuilds the expected field order and every symbol
// (Walsh-Hadamard chips, scrambler, SFFI/MODCOD spreading, QPSK payload) and
// checks the one-clock latency, sf_start, bits_ready and underflow.
module tb_superframe_gen;
  import pc_pkg::*;
  localparam int LS = 16, LF = 8, LH = 16, L2 = 8, LP = 8, LY = 12, NB = 2, NF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sym_tick = 0;
  logic [7:0] modcod = 8'hA5, wh_idx = 8'd13;
  logic [3:0] sffi = 4'b1011;
  logic scr_pilots = 1, scr_sosf = 1;
  logic bits_valid = 1;
  logic [1:0] bits = 0;
  logic bits_ready, out_valid, sf_start, underflow;
  cplx_t out_sym;
  seg_t out_seg;
  int checks = 0, failures = 0;

  superframe_gen #(.L_SOSF(LS), .L_SFFI(LF), .L_PLH(LH), .L_P2(L2), .L_P(LP),
                   .L_PAY(LY), .N_BLOCKS(NB), .N_FRAMES(NF)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sequence
  seg_t e_seg [$];
  int   e_idx [$];
  task automatic push(seg_t s, int len);
    for (int n = 0; n < len; n++) begin e_seg.push_back(s); e_idx.push_back(n); end
  endtask
  function automatic int lfsr_bit(int n);  // n-th output of x^7+x^6+1 from all ones
    int s;
    s = 127;
    for (int k = 0; k < n; k++) s = ((s << 1) & 127) | (((s >> 6) ^ (s >> 5)) & 1);
    return s & 1;
  endfunction

  int n_under = 0, n_sf = 0, pay_count = 0;
  initial begin
    for (int sf = 0; sf < 2; sf++) begin
      push(SEG_SOSF, LS); push(SEG_SFFI, LF);
      for (int f = 0; f < NF; f++) begin
        push(SEG_PLH, LH); push(SEG_P2, L2);
        for (int b = 0; b < NB; b++) begin push(SEG_PAYLOAD, LY); push(SEG_P, LP); end
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < e_seg.size(); t++) begin
      int neg, want_re, want_im, n;
      logic hold;
      seg_t s;
      s = e_seg[t]; n = e_idx[t];
      @(negedge clk);
      hold = (s == SEG_PAYLOAD) && ($urandom % 8 == 0);
      bits_valid = !hold;
      bits = 2'(pay_count * 7 + 3);
      sym_tick = 1;
      #1;
      case (s)
        SEG_SOSF: neg = ($countones(int'(wh_idx) & n) & 1) ^ lfsr_bit(n);
        SEG_SFFI: neg = sffi[3 - n / (LF / 4)];
        SEG_PLH:  neg = modcod[7 - n / (LH / 8)];
        SEG_P2:   neg = ($countones((int'(wh_idx) % L2) & n) & 1) ^ lfsr_bit(n);
        SEG_P:    neg = ($countones((int'(wh_idx) % LP) & n) & 1) ^ lfsr_bit(n);
        default:  neg = 0;
      endcase
      if (s == SEG_PAYLOAD) begin
        want_re = (bits_valid && bits[0]) ? -SYM_A : SYM_A;
        want_im = (bits_valid && bits[1]) ? -SYM_A : SYM_A;
      end else begin
        want_re = neg ? -SYM_A : SYM_A; want_im = want_re;
      end
      checks++;
      if (bits_ready != (s == SEG_PAYLOAD)) begin failures++; $display("FAIL bits_ready t=%0d", t); end
      @(posedge clk); #1;
      sym_tick = 0;
      if (s == SEG_PAYLOAD && !hold) pay_count++;
      checks++;
      if (!out_valid || out_seg != s || int'(out_sym.re) != want_re || int'(out_sym.im) != want_im ||
          sf_start != (s == SEG_SOSF && n == 0) || underflow != hold) begin
        failures++;
        $display("FAIL t=%0d seg=%0d/%0d idx=%0d sym=(%0d,%0d) exp=(%0d,%0d) sfs=%0b uf=%0b", t, out_seg, s, n,
                 out_sym.re, out_sym.im, want_re, want_im, sf_start, underflow);
      end
      if (underflow) n_under++;
      if (sf_start) n_sf++;
      // idle cycle between symbols: nothing new
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid without tick"); end
    end
    checks++;
    if (n_sf != 2 || n_under == 0) begin failures++; $display("FAIL sf_start=%0d underflow=%0d", n_sf, n_under); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Superframe synchroniser of the user terminal.
//
// Correlates the oversampled input with the terminal's own SOSF sequence
// (Walsh-Hadamard row wh_idx, optionally scrambled), taking every OSF-th
// sample:  c(t) = sum_{n=0}^{L-1} a_n * r[t - (L-1-n)*OSF],  a_n = +/-1.
// The metric |c/L|^2 is compared with `threshold`.  Above it, the block keeps
// the largest metric seen; once WIN_SYM*OSF samples have passed without a
// larger one, the maximum is taken as the last SOSF symbol at its best
// sampling phase, and `sync` pulses exactly WIN_SYM*OSF samples after that
// sample.  The symbol on which sync pulses is therefore symbol WIN_SYM-1 of
// the SFFI field (WIN_SYM must be below the SFFI length).  After a sync the
// search is held off for one SOSF length (L*OSF samples), so the correlation
// sidelobes of a periodic Walsh-Hadamard row that follow the peak are not
// taken for another SOSF.  peak_corr = c/L at
// the peak, i.e. the channel gain times the SOSF symbol amplitude, and
// peak_metric are reported with it.  The detection rule is this design's own.
// The input samples are passed on (out_valid/out_smp), registered, so that
// sync is aligned with the sample it refers to.  Latency: one clock.
module frame_sync
  import pc_pkg::*;
#(
  parameter int unsigned L       = SOSF_LEN,
  parameter int unsigned OSF_P   = OSF,
  parameter int unsigned WIN_SYM = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_smp,
  input  logic [7:0]  wh_idx,
  input  logic        scr_sosf,
  input  logic [47:0] threshold,
  output logic        out_valid,
  output cplx_t       out_smp,
  output logic        sync,
  output cplx_t       peak_corr,
  output logic [47:0] peak_metric,
  output logic [31:0] sync_count
);
  localparam int unsigned DL  = (L - 1) * OSF_P + 1;
  localparam int unsigned LW  = $clog2(L);
  localparam int unsigned WIN = WIN_SYM * OSF_P;

  cplx_t              dline [DL];     // dline[0] = newest sample
  logic [L-1:0]       ref_neg;        // a_n = -1 where set
  logic signed [47:0] cr, ci;
  cplx_t              c_norm;
  logic [47:0]        metric;
  logic               searching;
  logic [47:0]        best;
  cplx_t              best_corr;
  logic [$clog2(WIN+1)-1:0] age;
  localparam int unsigned HOLD = L * OSF_P;
  logic [$clog2(HOLD+1)-1:0] hold;

  // Reference chips (SOSF of this terminal's stream)
  always_comb begin
    logic [6:0] s;
    s = SCR_SEED;
    for (int n = 0; n < L; n++) begin
      ref_neg[n] = wh_chip(wh_idx, 8'(n)) ^ (scr_sosf & s[0]);
      s = scr_next(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DL; k++) dline[k] <= CPLX_ZERO;
    end else if (in_valid) begin
      dline[0] <= in_smp;
      for (int k = 1; k < DL; k++) dline[k] <= dline[k-1];
    end
  end

  // Correlation over the window ending with the incoming sample
  always_comb begin
    cr = '0;
    ci = '0;
    for (int n = 0; n < L; n++) begin
      cplx_t r;
      r = (n == L - 1) ? in_smp : dline[(L - 2 - n) * OSF_P + OSF_P - 1];
      if (ref_neg[n]) begin
        cr -= 48'(r.re);
        ci -= 48'(r.im);
      end else begin
        cr += 48'(r.re);
        ci += 48'(r.im);
      end
    end
    c_norm.re = sat(cr >>> LW);
    c_norm.im = sat(ci >>> LW);
    metric    = 48'(48'(c_norm.re) * 48'(c_norm.re) + 48'(c_norm.im) * 48'(c_norm.im));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      searching   <= 1'b0;
      best        <= '0;
      best_corr   <= CPLX_ZERO;
      age         <= '0;
      hold        <= '0;
      sync        <= 1'b0;
      peak_corr   <= CPLX_ZERO;
      peak_metric <= '0;
      sync_count  <= '0;
      out_valid   <= 1'b0;
      out_smp     <= CPLX_ZERO;
    end else begin
      sync      <= 1'b0;
      out_valid <= in_valid;
      if (in_valid) begin
        out_smp <= in_smp;
        if (hold != '0) hold <= hold - 1'b1;
        if (hold == '0 && metric > threshold && (!searching || metric > best)) begin
          searching <= 1'b1;
          best      <= metric;
          best_corr <= c_norm;
          age       <= '0;
        end else if (searching) begin
          if (age == ($clog2(WIN+1))'(WIN - 1)) begin
            searching   <= 1'b0;
            sync        <= 1'b1;
            peak_corr   <= best_corr;
            peak_metric <= best;
            sync_count  <= sync_count + 1'b1;
            hold        <= ($clog2(HOLD+1))'(HOLD);
          end
          age <= age + 1'b1;
        end
      end
    end
  end
endmodule

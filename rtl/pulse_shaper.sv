// Pulse-shaping interpolator: symbols in, OSF samples per symbol out.
//
// A symbol arrives on in_valid, exactly once every OSF clocks.  The block keeps
// the last SPAN symbols and, on the clock after each symbol and the OSF-1
// clocks that follow, outputs the polyphase sample
//   y[p] = sum_{m=0}^{SPAN-1} h[m*OSF + p] * sym[n-m],  p = 0..OSF-1,
// which is the zero-stuffed symbol stream filtered by the NTAPS = OSF*SPAN
// tap response h.  Four tap banks hold the raised-cosine responses for the
// four roll-off factors (0.2, 0.15, 0.1, 0.05 in the intended use);
// rolloff_sel picks the bank.  Banks are written by the host (coef_we,
// coef_bank, coef_idx, coef_data, Q(CFRAC)); reset loads a response whose only
// non-zero tap is h[0] = 1.0 in every bank.  Filter length and the host
// loading of the taps are this design's choices.  out_valid is high for the
// OSF clocks following each symbol.
module pulse_shaper
  import pc_pkg::*;
#(
  parameter int unsigned OSF_P  = OSF,
  parameter int unsigned SPAN   = 8,
  parameter int unsigned NBANKS = 4,
  parameter int unsigned CW     = 16,
  localparam int unsigned NTAPS = OSF_P * SPAN
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  cplx_t                     in_sym,
  input  logic [$clog2(NBANKS)-1:0] rolloff_sel,
  output logic                      out_valid,
  output cplx_t                     out_smp,
  input  logic                      coef_we,
  input  logic [$clog2(NBANKS)-1:0] coef_bank,
  input  logic [$clog2(NTAPS)-1:0]  coef_idx,
  input  logic signed [CW-1:0]      coef_data
);
  logic signed [CW-1:0]       taps [NBANKS][NTAPS];
  cplx_t                      syms [SPAN];
  logic [$clog2(OSF_P+1)-1:0] phase;   // OSF_P = idle
  cplx_t                      y_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= ($clog2(OSF_P+1))'(OSF_P);
      for (int m = 0; m < SPAN; m++) syms[m] <= CPLX_ZERO;
      for (int b = 0; b < NBANKS; b++)
        for (int k = 0; k < NTAPS; k++)
          taps[b][k] <= (k == 0) ? CW'(1 << CFRAC) : '0;
    end else begin
      if (coef_we) taps[coef_bank][coef_idx] <= coef_data;
      if (in_valid) begin
        syms[0] <= in_sym;
        for (int m = 1; m < SPAN; m++) syms[m] <= syms[m-1];
        phase <= '0;
      end else if (phase != ($clog2(OSF_P+1))'(OSF_P)) begin
        phase <= phase + 1'b1;
      end
    end
  end

  always_comb begin
    logic signed [47:0] sr, si;
    sr = '0;
    si = '0;
    for (int m = 0; m < SPAN; m++) begin
      sr += 48'(syms[m].re) * 48'(taps[rolloff_sel][m*OSF_P + int'(phase)]);
      si += 48'(syms[m].im) * 48'(taps[rolloff_sel][m*OSF_P + int'(phase)]);
    end
    y_c.re = sat((sr + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
    y_c.im = sat((si + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_smp   <= CPLX_ZERO;
    end else begin
      out_valid <= phase != ($clog2(OSF_P+1))'(OSF_P);
      if (phase != ($clog2(OSF_P+1))'(OSF_P)) out_smp <= y_c;
    end
  end
endmodule

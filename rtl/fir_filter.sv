// Programmable FIR filter with real taps on a complex sample stream.
//
// y[n] = sum_k h[k] * x[n-k], k = 0..NTAPS-1, taps signed CW bits in Q(CFRAC),
// the same taps on I and Q.  A new sample is shifted in on each in_valid; the
// sum of products is rounded, saturated and registered, so out_valid follows
// in_valid by one clock.  Taps are written one at a time (coef_we, coef_idx,
// coef_data) and take effect immediately.  Reset loads a unit impulse
// (h[0] = 1.0), so an unconfigured filter passes the stream through.
// The chain uses it as the IMUX and OMUX filters of the channel emulator and
// as the terminal's matched filter; the responses are loaded by the host.
module fir_filter
  import pc_pkg::*;
#(
  parameter int unsigned NTAPS = 32,
  parameter int unsigned CW    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  cplx_t                    in_smp,
  output logic                     out_valid,
  output cplx_t                    out_smp,
  input  logic                     coef_we,
  input  logic [$clog2(NTAPS)-1:0] coef_idx,
  input  logic signed [CW-1:0]     coef_data
);
  logic signed [CW-1:0] taps  [NTAPS];
  cplx_t                dline [NTAPS];
  cplx_t                y_c;

  // Delay line: dline[0] is the newest sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) begin
        dline[k] <= CPLX_ZERO;
        taps[k]  <= (k == 0) ? CW'(1 << CFRAC) : '0;
      end
    end else begin
      if (coef_we) taps[coef_idx] <= coef_data;
      if (in_valid) begin
        dline[0] <= in_smp;
        for (int k = 1; k < NTAPS; k++) dline[k] <= dline[k-1];
      end
    end
  end

  // Sum of products over the delay line including the incoming sample
  always_comb begin
    logic signed [47:0] sr, si;
    sr = 48'(in_smp.re) * 48'(taps[0]);
    si = 48'(in_smp.im) * 48'(taps[0]);
    for (int k = 1; k < NTAPS; k++) begin
      sr += 48'(dline[k-1].re) * 48'(taps[k]);
      si += 48'(dline[k-1].im) * 48'(taps[k]);
    end
    y_c.re = sat((sr + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
    y_c.im = sat((si + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_smp   <= CPLX_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_smp <= y_c;
    end
  end
endmodule

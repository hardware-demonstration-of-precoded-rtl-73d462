// TWTA non-linearity emulator (AM/AM and AM/PM) for one stream.
//
// The instantaneous input power p = I^2 + Q^2 selects one of 2**LUT_AW
// entries of a complex gain table; the output is y = x * g[idx] with g in
// Q(GFRAC).  An entry holds A(r)/r * exp(j*phi(r)), the amplitude and phase
// transfer of the tube at that drive level, so one complex multiply applies
// both characteristics.  Indexing: idx = min(p >> (2*SW-1-LUT_AW), 2**LUT_AW-1),
// i.e. the table is uniform in input power up to a component amplitude of
// 2**(SW-1).  The host writes the table (lut_we, lut_addr, lut_data); reset
// fills it with unity gain, a linear amplifier.  The table form and indexing
// are this design's choices.  Latency: two clocks.
module twta
  import pc_pkg::*;
#(
  parameter int unsigned LUT_AW = 6,
  parameter int unsigned GFRAC  = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  cplx_t             in_smp,
  output logic              out_valid,
  output cplx_t             out_smp,
  input  logic              lut_we,
  input  logic [LUT_AW-1:0] lut_addr,
  input  cplx_t             lut_data
);
  localparam int unsigned NLUT = 1 << LUT_AW;
  cplx_t             lut [NLUT];
  logic [2*SW:0]     pwr;
  logic [LUT_AW-1:0] idx_c;
  logic [LUT_AW-1:0] idx_q;
  cplx_t             x_q;
  logic              v_q;
  cplx_t             g;
  logic signed [47:0] pr, pi;

  always_comb begin
    pwr = (2*SW+1)'(48'(in_smp.re) * 48'(in_smp.re) + 48'(in_smp.im) * 48'(in_smp.im));
    if ((pwr >> (2*SW-1-LUT_AW)) >= (2*SW+1)'(NLUT)) idx_c = LUT_AW'(NLUT - 1);
    else                                           idx_c = LUT_AW'(pwr >> (2*SW-1-LUT_AW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NLUT; k++) lut[k] <= '{re: SW'(1 << GFRAC), im: '0};
    end else if (lut_we) begin
      lut[lut_addr] <= lut_data;
    end
  end

  // Stage 1: table index
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0;
      x_q   <= CPLX_ZERO;
      v_q   <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        idx_q <= idx_c;
        x_q   <= in_smp;
      end
    end
  end

  // Stage 2: complex gain
  assign g  = lut[idx_q];
  assign pr = 48'(x_q.re) * 48'(g.re) - 48'(x_q.im) * 48'(g.im);
  assign pi = 48'(x_q.re) * 48'(g.im) + 48'(x_q.im) * 48'(g.re);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_smp   <= CPLX_ZERO;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        out_smp.re <= sat((pr + (48'sd1 <<< (GFRAC-1))) >>> GFRAC);
        out_smp.im <= sat((pi + (48'sd1 <<< (GFRAC-1))) >>> GFRAC);
      end
    end
  end
endmodule

// N x N complex matrix times N-vector, one vector per cycle.
//
// out[i] = sum_j M[i][j] * in[j], coefficients in Q(CFRAC), result rounded and
// saturated to SW bits; registered, so the latency is one clock.  The
// coefficients are written one at a time into a shadow copy (coef_we,
// coef_row, coef_col, coef_data) and become active together on a one-cycle
// commit pulse, so a new matrix never mixes with the old one.  Reset loads
// the identity into both copies.  Used by the precoder (W) and by the MIMO
// channel emulator (H).
module cmat_vec
  import pc_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_vec  [N],
  output logic                 out_valid,
  output cplx_t                out_vec [N],
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_row,
  input  logic [$clog2(N)-1:0] coef_col,
  input  cplx_t                coef_data,
  input  logic                 commit
);
  cplx_t shadow [N][N];
  cplx_t active [N][N];
  cplx_t acc_c  [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          shadow[i][j] <= (i == j) ? CPLX_ONE : CPLX_ZERO;
          active[i][j] <= (i == j) ? CPLX_ONE : CPLX_ZERO;
        end
    end else begin
      if (coef_we) shadow[coef_row][coef_col] <= coef_data;
      if (commit) active <= shadow;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [47:0] sr, si;
      sr = '0;
      si = '0;
      for (int j = 0; j < N; j++) begin
        sr += 48'(in_vec[j].re) * 48'(active[i][j].re) - 48'(in_vec[j].im) * 48'(active[i][j].im);
        si += 48'(in_vec[j].re) * 48'(active[i][j].im) + 48'(in_vec[j].im) * 48'(active[i][j].re);
      end
      acc_c[i].re = sat((sr + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
      acc_c[i].im = sat((si + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) out_vec[i] <= CPLX_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_vec <= acc_c;
    end
  end
endmodule

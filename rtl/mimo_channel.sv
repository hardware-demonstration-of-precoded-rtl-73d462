// MIMO channel emulator: y = H * x over the N streams of one sample instant.
//
// The N streams from the emulator's radio nodes arrive together (one sample
// of every stream per in_valid); every output stream is the complex mix of all
// inputs by one row of the N x N channel matrix H, which models the beam
// gains and the multi-beam interference of full frequency reuse.  The host
// loads H entry by entry (h_we, h_row, h_col, h_data in Q(CFRAC)) and makes
// the new matrix active with h_commit, at once for all entries.  Reset loads
// the identity (no interference).  Latency: one clock.
module mimo_channel
  import pc_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_smp  [N],
  output logic                 out_valid,
  output cplx_t                out_smp [N],
  input  logic                 h_we,
  input  logic [$clog2(N)-1:0] h_row,
  input  logic [$clog2(N)-1:0] h_col,
  input  cplx_t                h_data,
  input  logic                 h_commit,
  output logic [31:0]          h_updates     // number of committed matrices
);
  cmat_vec #(.N(N)) u_mat (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_vec   (in_smp),
    .out_valid(out_valid),
    .out_vec  (out_smp),
    .coef_we  (h_we),
    .coef_row (h_row),
    .coef_col (h_col),
    .coef_data(h_data),
    .commit   (h_commit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        h_updates <= '0;
    else if (h_commit) h_updates <= h_updates + 1'b1;
  end
endmodule

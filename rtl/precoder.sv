// Block-level precoder (PRECODE): x = W * s for the symbols of one time slot.
//
// Each valid cycle carries the N symbols of one superframe time slot and the
// segment tag they belong to.  Stream k takes part in precoding when its rank
// (rho) is 1 (ZF/MMSE) or 3 (SLP if possible, otherwise ZF/MMSE) and the
// precoding mask enables precoding for the current segment.  With P the set of
// participating streams:  x[i] = sum_{j in P} W[i][j] s[j]  for i in P, and
// x[i] = s[i] otherwise.  Rank 0 means no precoding; rank 2 is reserved and is
// treated as rank 0.  Symbol-level precoding is not defined here: where the SLP
// mask bit and rank 3 would select it, the block falls back to W and reports
// the fallback on slp_fallback.  The normal operating mask (SOSF and P off,
// the rest on) is 6'b101110.
//
// W is written entry by entry (w_we/w_row/w_col/w_data, Q(CFRAC)) into a
// shadow copy.  A w_commit request is held and takes effect at the first SOSF
// symbol of the next superframe and is used from the following slot on, so
// all precoded slots of a superframe use the same matrix.  Latency: one clock, symbols and tags delayed alike.
module precoder
  import pc_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // symbol input: one time slot of N streams
  input  logic                 in_valid,
  input  cplx_t                in_sym  [N],
  input  seg_t                 in_seg,
  // configuration
  input  logic [1:0]           rank    [N],
  input  logic [NUM_SEGS-1:0]  prec_mask,   // bit = seg_t value: precoding on
  input  logic [NUM_SEGS-1:0]  slp_mask,    // bit = seg_t value: SLP requested
  input  logic                 w_we,
  input  logic [$clog2(N)-1:0] w_row,
  input  logic [$clog2(N)-1:0] w_col,
  input  cplx_t                w_data,
  input  logic                 w_commit,
  // precoded output
  output logic                 out_valid,
  output cplx_t                out_sym [N],
  output seg_t                 out_seg,
  output logic [N-1:0]         out_precoded,
  output logic                 slp_fallback,
  output logic                 w_applied      // pulse with the first SOSF slot: new W active after it
);
  logic         commit_pending;
  logic         commit_now;
  seg_t         prev_seg;
  logic [N-1:0] part;
  cplx_t        masked [N];
  cplx_t        mat_out [N];
  logic         mat_valid;
  cplx_t        sym_d [N];
  logic [N-1:0] part_d;
  logic         slp_c;

  // Stream participation for this slot
  always_comb begin
    slp_c = 1'b0;
    for (int k = 0; k < N; k++) begin
      part[k]   = prec_mask[in_seg] && (rank[k] == 2'd1 || rank[k] == 2'd3);
      masked[k] = part[k] ? in_sym[k] : CPLX_ZERO;
      if (part[k] && rank[k] == 2'd3 && slp_mask[in_seg]) slp_c = 1'b1;
    end
  end

  // Apply a pending commit at the first SOSF symbol of a superframe
  assign commit_now = commit_pending && in_valid && in_seg == SEG_SOSF && prev_seg != SEG_SOSF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      commit_pending <= 1'b0;
      prev_seg       <= SEG_PAYLOAD;
    end else begin
      if (in_valid) prev_seg <= in_seg;
      if (commit_now)    commit_pending <= 1'b0;
      else if (w_commit) commit_pending <= 1'b1;
    end
  end

  // The matrix swap happens at the edge that registers the first SOSF slot,
  // so that slot still uses the old W and every later slot the new one.  The
  // SOSF is not precoded in normal operation, so no precoded slot is split.
  cmat_vec #(.N(N)) u_mat (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_vec   (masked),
    .out_valid(mat_valid),
    .out_vec  (mat_out),
    .coef_we  (w_we),
    .coef_row (w_row),
    .coef_col (w_col),
    .coef_data(w_data),
    .commit   (commit_now)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_d       <= '0;
      out_seg      <= SEG_SOSF;
      slp_fallback <= 1'b0;
      w_applied    <= 1'b0;
      for (int k = 0; k < N; k++) sym_d[k] <= CPLX_ZERO;
    end else begin
      w_applied <= commit_now;
      if (in_valid) begin
        part_d       <= part;
        sym_d        <= in_sym;
        out_seg      <= in_seg;
        slp_fallback <= slp_c;
      end
    end
  end

  assign out_valid    = mat_valid;
  assign out_precoded = part_d;
  always_comb
    for (int k = 0; k < N; k++) out_sym[k] = part_d[k] ? mat_out[k] : sym_d[k];
endmodule

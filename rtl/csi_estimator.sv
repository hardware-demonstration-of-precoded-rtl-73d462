// Channel state estimator of the user terminal.
//
// Over every P pilot field (and, separately, every P2 field) it correlates the
// received symbols with the pilot sequence of each of the N gateway streams:
//   acc_j = sum_n r[n] * a_j[n],   a_j[n] = +/-1, Walsh-Hadamard row
//   (wh_idx[j] mod field length), scrambled like the generator when
//   scr_pilots is set.
// Because the rows are orthogonal, acc_j = L * SYM_A * (1+j) * h_j, where h_j
// is the gain from stream j to this terminal.  At the end of the field the
// block outputs h_j = acc_j * (1-j) / (2 * SYM_A * L) in Q(CFRAC) for all j at
// once (csi_valid, csi, csi_seg = SEG_P or SEG_P2).  P pilots are sent
// unprecoded, so their estimate is the row of H the gateway needs; P2 pilots
// are precoded, so their estimate is the row of the effective channel H*W.
// SYM_A and the field lengths must be powers of two.  Output one clock after
// the last pilot symbol of the field.
module csi_estimator
  import pc_pkg::*;
#(
  parameter int unsigned N    = NUM_STREAMS,
  parameter int unsigned L_P  = P_LEN,
  parameter int unsigned L_P2 = P2_LEN
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sym_valid,
  input  cplx_t       sym,
  input  seg_t        sym_seg,
  input  logic [15:0] sym_idx,
  input  logic [7:0]  wh_idx [N],
  input  logic        scr_pilots,
  output logic        csi_valid,
  output cplx_t       csi [N],
  output seg_t        csi_seg,
  output logic [31:0] csi_count
);
  localparam int unsigned SH_P  = 1 + $clog2(SYM_A) + $clog2(L_P)  - CFRAC;
  localparam int unsigned SH_P2 = 1 + $clog2(SYM_A) + $clog2(L_P2) - CFRAC;
  localparam int unsigned AW    = 40;

  logic signed [AW-1:0] acc_re [N];
  logic signed [AW-1:0] acc_im [N];
  logic signed [AW-1:0] nre    [N];
  logic signed [AW-1:0] nim    [N];
  logic [6:0]           scr;
  logic                 pilot;
  logic                 last;
  logic [7:0]           mask;

  assign pilot = sym_valid && (sym_seg == SEG_P || sym_seg == SEG_P2);
  assign mask  = (sym_seg == SEG_P) ? 8'(L_P - 1) : 8'(L_P2 - 1);
  assign last  = (sym_seg == SEG_P) ? (sym_idx == 16'(L_P - 1)) : (sym_idx == 16'(L_P2 - 1));

  // Accumulators including the current symbol
  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic neg;
      logic signed [AW-1:0] bre, bim;
      neg = wh_chip(wh_idx[j] & mask, sym_idx[7:0]) ^ (scr_pilots & scr[0]);
      bre = (sym_idx == '0) ? '0 : acc_re[j];
      bim = (sym_idx == '0) ? '0 : acc_im[j];
      nre[j] = neg ? bre - AW'(sym.re) : bre + AW'(sym.re);
      nim[j] = neg ? bim - AW'(sym.im) : bim + AW'(sym.im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) begin
        acc_re[j] <= '0;
        acc_im[j] <= '0;
        csi[j]    <= CPLX_ZERO;
      end
      scr       <= SCR_SEED;
      csi_valid <= 1'b0;
      csi_seg   <= SEG_P;
      csi_count <= '0;
    end else begin
      csi_valid <= 1'b0;
      if (pilot) begin
        acc_re <= nre;
        acc_im <= nim;
        scr    <= last ? SCR_SEED : scr_next(scr);
        if (last) begin
          csi_valid <= 1'b1;
          csi_seg   <= sym_seg;
          csi_count <= csi_count + 1'b1;
          for (int j = 0; j < N; j++) begin
            // (re + j im)(1 - j) = (re + im) + j (im - re)
            csi[j].re <= sat((48'(nre[j]) + 48'(nim[j])) >>> ((sym_seg == SEG_P) ? SH_P : SH_P2));
            csi[j].im <= sat((48'(nim[j]) - 48'(nre[j])) >>> ((sym_seg == SEG_P) ? SH_P : SH_P2));
          end
        end
      end
    end
  end
endmodule

// Soft demapper for the QPSK payload: one log-likelihood ratio per bit.
//
// The payload maps bit 0 to the sign of I and bit 1 to the sign of Q, a 1
// giving the negative value.  For Gray-mapped QPSK in Gaussian noise the LLR
// of each bit is then proportional to its own component:
// LLR = ln(P(b=0)/P(b=1)) = 2*A*y/sigma^2 for component amplitude A.  The
// block computes llr = sat((y * scale) >>> 16) on LLRW bits, so the host sets
// scale = 2**16 * 2*A/sigma^2 * (LLR units per natural-log unit) from its
// noise estimate.  Only PAYLOAD symbols produce LLRs; hard decisions
// (llr < 0 means bit 1) come out alongside.
//
// Interface: tagged symbols in, llr_valid with two LLRs and two hard bits out,
// one clock later.  The receiver names a soft demodulator producing LLRs;
// the scaling, the width and the saturation are this design's choices.
module soft_demod
  import pc_pkg::*;
#(
  parameter int unsigned LLRW = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [15:0]            scale,
  input  logic                   in_valid,
  input  cplx_t                  in_sym,
  input  seg_t                   in_seg,
  output logic                   llr_valid,
  output logic signed [LLRW-1:0] llr [2],
  output logic [1:0]             hard
);
  localparam logic signed [LLRW-1:0] LMAX = {1'b0, {(LLRW-1){1'b1}}};
  localparam logic signed [LLRW-1:0] LMIN = {1'b1, {(LLRW-1){1'b0}}};

  function automatic logic signed [LLRW-1:0] llr_of(input logic signed [SW-1:0] y,
                                                    input logic [15:0] s);
    logic signed [SW+17:0] p;
    p = (SW+18)'(y) * $signed({2'b00, s});
    p = p >>> 16;
    if (p > (SW+18)'(LMAX))      return LMAX;
    else if (p < (SW+18)'(LMIN)) return LMIN;
    else                         return p[LLRW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      llr_valid <= 1'b0;
      llr[0]    <= '0;
      llr[1]    <= '0;
      hard      <= '0;
    end else begin
      llr_valid <= in_valid && in_seg == SEG_PAYLOAD;
      if (in_valid && in_seg == SEG_PAYLOAD) begin
        llr[0] <= llr_of(in_sym.re, scale);
        llr[1] <= llr_of(in_sym.im, scale);
        hard   <= {in_sym.im[SW-1], in_sym.re[SW-1]};
      end
    end
  end
endmodule

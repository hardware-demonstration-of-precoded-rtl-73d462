// Additive white Gaussian noise stage with configurable amplitude.
//
// Two 64-bit xorshift generators (one for I, one for Q) advance on every valid
// sample.  Each 64-bit word is cut into four 16-bit uniform numbers whose sum,
// centred, is an Irwin-Hall (n = 4) approximation of a Gaussian with standard
// deviation 2**16/sqrt(3).  It is scaled by `amp` (unsigned) and 2**-16, so the
// added noise has per-component standard deviation amp/sqrt(3) sample LSBs, and
// added to the input with saturation.  amp = 0 passes the stream unchanged.
// The generator type is this design's choice.  Seeds are parameters so that
// each stream gets independent noise.  Latency: one clock.
module awgn
  import pc_pkg::*;
#(
  parameter logic [63:0] SEED_I = 64'h9E37_79B9_7F4A_7C15,
  parameter logic [63:0] SEED_Q = 64'hD1B5_4A32_D192_ED03
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] amp,
  input  logic        in_valid,
  input  cplx_t       in_smp,
  output logic        out_valid,
  output cplx_t       out_smp
);
  logic [63:0]        st_i, st_q;
  logic signed [18:0] g_i, g_q;
  logic signed [47:0] n_i, n_q;

  function automatic logic [63:0] xorshift64(input logic [63:0] s);
    logic [63:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 7);
    t = t ^ (t << 17);
    return t;
  endfunction

  function automatic logic signed [18:0] irwin_hall(input logic [63:0] w);
    return 19'(w[15:0]) + 19'(w[31:16]) + 19'(w[47:32]) + 19'(w[63:48]) - 19'sd131072;
  endfunction

  assign g_i = irwin_hall(st_i);
  assign g_q = irwin_hall(st_q);
  assign n_i = (48'(g_i) * 48'(signed'({1'b0, amp}))) >>> 16;
  assign n_q = (48'(g_q) * 48'(signed'({1'b0, amp}))) >>> 16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_i      <= SEED_I;
      st_q      <= SEED_Q;
      out_valid <= 1'b0;
      out_smp   <= CPLX_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        st_i       <= xorshift64(st_i);
        st_q       <= xorshift64(st_q);
        out_smp.re <= sat(48'(in_smp.re) + n_i);
        out_smp.im <= sat(48'(in_smp.im) + n_q);
      end
    end
  end
endmodule

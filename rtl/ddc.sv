// Digital down-converter: NCO frequency shift followed by a decimation filter.
//
// The input is rotated by exp(-j*2*pi*fcw*n/2**32) (32-bit phase accumulator,
// CORDIC rotator), then a first-order CIC (integrate and dump) decimates by
// 2**dec_log2, dec_log2 = 0..MAX_LOG2, and divides by the same factor, so the
// pass-band gain is one.  dec_log2 = 0 passes every sample.  Changing dec_log2
// restarts the dump counter.  Latency: rotator (ITER + 2 clocks) plus one clock.
module ddc
  import pc_pkg::*;
#(
  parameter int unsigned ITER     = 14,
  parameter int unsigned MAX_LOG2 = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [31:0]                   fcw,
  input  logic [$clog2(MAX_LOG2+1)-1:0] dec_log2,
  input  logic                          in_valid,
  input  cplx_t                         in_smp,
  output logic                          out_valid,
  output cplx_t                         out_smp
);
  localparam int unsigned AW = SW + MAX_LOG2 + 1;
  logic [31:0]          phase_acc;
  logic                 rot_valid;
  cplx_t                rot_smp;
  logic [MAX_LOG2:0]    cnt;
  logic signed [AW-1:0] acc_re, acc_im;
  logic signed [AW-1:0] sum_re, sum_im;
  logic [$clog2(MAX_LOG2+1)-1:0] dec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        phase_acc <= '0;
    else if (in_valid) phase_acc <= phase_acc - fcw;
  end

  cordic_rot #(.ITER(ITER)) u_rot (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_smp   (in_smp),
    .angle    (phase_acc[31:16]),
    .out_valid(rot_valid),
    .out_smp  (rot_smp)
  );

  assign sum_re = acc_re + AW'(rot_smp.re);
  assign sum_im = acc_im + AW'(rot_smp.im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc_re    <= '0;
      acc_im    <= '0;
      dec_q     <= '0;
      out_valid <= 1'b0;
      out_smp   <= CPLX_ZERO;
    end else begin
      dec_q     <= dec_log2;
      out_valid <= 1'b0;
      if (dec_q != dec_log2) begin
        cnt    <= '0;
        acc_re <= '0;
        acc_im <= '0;
      end else if (rot_valid) begin
        if (cnt == (MAX_LOG2+1)'((1 << dec_log2) - 1)) begin
          cnt        <= '0;
          acc_re     <= '0;
          acc_im     <= '0;
          out_valid  <= 1'b1;
          out_smp.re <= sat(48'(sum_re >>> dec_log2));
          out_smp.im <= sat(48'(sum_im >>> dec_log2));
        end else begin
          cnt    <= cnt + 1'b1;
          acc_re <= sum_re;
          acc_im <= sum_im;
        end
      end
    end
  end
endmodule

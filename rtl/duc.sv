// Digital up-converter: shifts a complex baseband stream up by the NCO
// frequency, y[n] = x[n] * exp(j*2*pi*fcw*n/2**32).
//
// A 32-bit phase accumulator advances by the frequency control word fcw on
// every valid sample; its top 16 bits drive a CORDIC rotator.  Latency is that
// of the rotator (ITER + 2 clocks).  The conversion to the DAC rate and the RF
// stages belong to the radio front end and are not part of this block.
module duc
  import pc_pkg::*;
#(
  parameter int unsigned ITER = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] fcw,
  input  logic        in_valid,
  input  cplx_t       in_smp,
  output logic        out_valid,
  output cplx_t       out_smp
);
  logic [31:0] phase_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        phase_acc <= '0;
    else if (in_valid) phase_acc <= phase_acc + fcw;
  end

  cordic_rot #(.ITER(ITER)) u_rot (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_smp   (in_smp),
    .angle    (phase_acc[31:16]),
    .out_valid(out_valid),
    .out_smp  (out_smp)
  );
endmodule

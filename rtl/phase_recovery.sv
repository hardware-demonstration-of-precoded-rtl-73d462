// Fine carrier-phase tracking of the terminal's recovered symbols.
//
// Each symbol is rotated by -theta with a CORDIC.  On QPSK payload symbols a
// decision-directed detector, e = sgn(I)*Q - sgn(Q)*I (about 2*SYM_A*sin(phi)
// for a residual phase phi), drives a first-order loop:
// theta += (e << 17) >>> mu_shift, with theta a 32-bit phase word (full
// circle = 2**32).  The shift of 17 makes a unit loop gain correct the whole
// error in one step for symbols of amplitude SYM_A; mu_shift divides that.
// Other segments (SOSF, SFFI, PLH, pilots) are rotated but do not update
// theta, since they carry superposed pilots or other constellations.  A
// superframe sync clears theta, so each superframe starts at zero and the loop
// cannot carry a 90-degree false lock from one superframe to the next.
//
// Interface: a symbol stream with segment and index tags in, the same stream
// rotated out with its tags.  Latency ITER+2 = 16 clocks; symbols may arrive
// on any clock.  The error uses the rotated output, so the loop acts with the
// pipeline delay: keep mu_shift >= 2 when symbols arrive on every clock.
// The receiver names a fine phase-tracking stage; the detector, the loop and
// its gain are this design's own choices.
module phase_recovery
  import pc_pkg::*;
#(
  parameter int unsigned ITER = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync,
  input  logic [3:0]  mu_shift,
  input  logic        in_valid,
  input  cplx_t       in_sym,
  input  seg_t        in_seg,
  input  logic [15:0] in_idx,
  output logic        out_valid,
  output cplx_t       out_sym,
  output seg_t        out_seg,
  output logic [15:0] out_idx,
  output logic [15:0] phase
);
  localparam int unsigned LAT = ITER + 2;

  logic [31:0] theta;
  logic        rot_valid;
  cplx_t       rot_sym;

  cordic_rot #(.ITER(ITER)) u_rot (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_smp   (in_sym),
    .angle    (16'(-theta[31:16])),
    .out_valid(rot_valid),
    .out_smp  (rot_sym)
  );

  // segment and index tags travel beside the rotator
  seg_t        seg_d [LAT];
  logic [15:0] idx_d [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        seg_d[i] <= SEG_SOSF;
        idx_d[i] <= '0;
      end
    end else begin
      seg_d[0] <= in_seg;
      idx_d[0] <= in_idx;
      for (int i = 1; i < LAT; i++) begin
        seg_d[i] <= seg_d[i-1];
        idx_d[i] <= idx_d[i-1];
      end
    end
  end

  // decision-directed phase detector and loop
  logic signed [SW:0]  err;
  logic [31:0]         step;   // wraps modulo a full circle
  always_comb begin
    err  = (rot_sym.re[SW-1] ? -(SW+1)'(rot_sym.im) : (SW+1)'(rot_sym.im))
         - (rot_sym.im[SW-1] ? -(SW+1)'(rot_sym.re) : (SW+1)'(rot_sym.re));
    step = 32'((48'(err) <<< 17) >>> mu_shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   theta <= '0;
    else if (sync)                                theta <= '0;
    else if (rot_valid && seg_d[LAT-1] == SEG_PAYLOAD) theta <= theta + step;
  end

  assign out_valid = rot_valid;
  assign out_sym   = rot_sym;
  assign out_seg   = seg_d[LAT-1];
  assign out_idx   = idx_d[LAT-1];
  assign phase     = theta[31:16];
endmodule

// Pipelined CORDIC rotator: out = in * exp(j*2*pi*angle/2**16).
//
// The angle is a 16-bit phase word (full circle = 2**16).  A first stage maps
// the angle into [-90, 90) degrees by negating the input when needed; then
// ITER micro-rotations by +/-atan(2**-i) follow, one pipeline register each.
// The CORDIC gain (about 1.6468) is removed at the end by a multiply with
// round(2**15/1.6468) = 19898.  Latency: ITER + 2 clocks; `valid` travels with
// the data.  The micro-rotation angles are round(atan(2**-i) * 2**16 / (2*pi)).
module cordic_rot
  import pc_pkg::*;
#(
  parameter int unsigned ITER = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_smp,
  input  logic [15:0] angle,
  output logic        out_valid,
  output cplx_t       out_smp
);
  localparam int unsigned XW = SW + 3;
  localparam logic [15:0] ATAN [16] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41, 16'd20, 16'd10, 16'd5, 16'd3, 16'd1, 16'd1, 16'd0};

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic signed [15:0]   z [ITER+1];
  logic                 v [ITER+2];

  // Stage 0: quadrant pre-rotation by 0 or 180 degrees
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      if (angle[15] ^ angle[14]) begin  // 90..270 degrees
        x[0] <= -XW'(in_smp.re);
        y[0] <= -XW'(in_smp.im);
        z[0] <= signed'(angle + 16'h8000);
      end else begin
        x[0] <= XW'(in_smp.re);
        y[0] <= XW'(in_smp.im);
        z[0] <= signed'(angle);
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; v[i+1] <= 1'b0;
      end else begin
        v[i+1] <= v[i];
        if (z[i] >= 0) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - signed'(ATAN[i]);
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + signed'(ATAN[i]);
        end
      end
    end
  end

  // Gain compensation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_smp <= CPLX_ZERO;
      v[ITER+1] <= 1'b0;
    end else begin
      v[ITER+1] <= v[ITER];
      out_smp.re <= sat((48'(x[ITER]) * 48'sd19898 + 48'sd16384) >>> 15);
      out_smp.im <= sat((48'(y[ITER]) * 48'sd19898 + 48'sd16384) >>> 15);
    end
  end
  assign out_valid = v[ITER+1];
endmodule

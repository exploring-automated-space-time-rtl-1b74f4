// One lane of the Phase kernel: the angle of the gradient vector (gx, gy).
//
// The result uses the OpenVX U8 phase encoding: 0 along +x, counter-clockwise,
// 256 steps per full turn, rounded to the nearest step; (0,0) gives 0.
// Method (this design's choice): a quadrant pre-rotation by +-90 degrees
// brings the vector into the right half-plane, then ITER unrolled CORDIC
// vectoring steps drive y to zero while an angle accumulator, in units of
// 2*pi/65536, sums the rotations. Inputs get 8 fraction bits first so small
// vectors keep their precision. The result is within one step of the exact
// rounded angle. Purely combinational.
module phase_core
  import ovx_pkg::*;
#(
  parameter int ITER = 14
) (
  input  grad_pair_t  grad,
  output logic [7:0]  phase
);
  localparam int XW = 28;   // 16 input + 8 fraction + growth + sign

  // round(atan(2^-i) * 65536 / (2*pi)) for i = 0..15
  localparam logic [15:0] ATAN [16] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41,   16'd20,   16'd10,   16'd5,    16'd3,   16'd1,   16'd1,   16'd0};

  initial begin
    if (ITER > 16 || ITER < 1) $error("phase_core: ITER must be 1..16");
  end

  always_comb begin
    logic signed [XW-1:0] x, y, xs, ys;
    logic [15:0] z;
    logic [15:0] zr;
    x = XW'(grad.gx) <<< 8;
    y = XW'(grad.gy) <<< 8;
    z = '0;
    if (grad.gx < 0) begin
      if (grad.gy >= 0) begin   // rotate by -90 degrees
        xs = y;  ys = -x; z = 16'h4000;
      end else begin            // rotate by +90 degrees
        xs = -y; ys = x;  z = 16'hC000;
      end
      x = xs; y = ys;
    end
    for (int i = 0; i < ITER; i++) begin
      xs = x >>> i;
      ys = y >>> i;
      if (y >= 0) begin
        x = x + ys; y = y - xs; z = z + ATAN[i];
      end else begin
        x = x - ys; y = y + xs; z = z - ATAN[i];
      end
    end
    zr = z + 16'd128;
    phase = (grad.gx == 0 && grad.gy == 0) ? 8'd0 : 8'(zr >> 8);
  end
endmodule

// One lane of the Magnitude kernel.
//
// mag = round(sqrt(gx^2 + gy^2)), saturated to 32767 for the OpenVX S16
// output. The square root is a combinational restoring integer square root
// of 4*(gx^2+gy^2), which gives floor(2*sqrt(s)); adding one and halving
// rounds to nearest. Rounding and saturation are this design's choices.
module magnitude_core
  import ovx_pkg::*;
(
  input  grad_pair_t        grad,
  output logic [GRAD_W-1:0] mag
);
  localparam int SW = 34;            // 4*(2*2^30) < 2^34
  localparam int RW = SW / 2;        // 17-bit root

  logic [SW-1:0] s;
  logic [RW-1:0] root;
  logic [RW:0]   rounded;

  always_comb begin
    logic signed [31:0] x2, y2;
    logic [SW+1:0] rem, trial;
    x2 = 32'(grad.gx) * 32'(grad.gx);
    y2 = 32'(grad.gy) * 32'(grad.gy);
    s  = (SW'(unsigned'(x2)) + SW'(unsigned'(y2))) << 2;
    rem  = '0;
    root = '0;
    for (int i = RW - 1; i >= 0; i--) begin
      rem   = (rem << 2) | (SW+2)'(s[2*i +: 2]);
      trial = ((SW+2)'(root) << 2) | (SW+2)'(1);
      if (rem >= trial) begin
        rem  = rem - trial;
        root = (root << 1) | RW'(1);
      end else begin
        root = root << 1;
      end
    end
    rounded = ((RW+1)'(root) + 1'b1) >> 1;
    mag = (rounded > (RW+1)'(32767)) ? GRAD_W'(32767) : GRAD_W'(rounded);
  end
endmodule

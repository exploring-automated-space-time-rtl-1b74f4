// One lane of the ColorConvert kernel: RGB888 to 8-bit gray (luma).
//
// Y = (54*R + 183*G + 19*B + 128) >> 8, the BT.709 luma weights scaled to
// 256 and rounded. The weights sum to 256, so the result never exceeds 255.
// The formula is this design's choice of the OpenVX RGB-to-luma conversion.
// Purely combinational; R is bits 7:0, G 15:8, B 23:16.
module color_convert_core (
  input  logic [23:0] rgb,
  output logic [7:0]  y
);
  logic [15:0] acc;
  always_comb begin
    acc = 16'd54 * 16'(rgb[7:0]) + 16'd183 * 16'(rgb[15:8])
        + 16'd19 * 16'(rgb[23:16]) + 16'd128;
    y = 8'(acc >> 8);
  end
endmodule

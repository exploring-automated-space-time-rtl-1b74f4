// Self-checking test of color_convert_core against a real-valued BT.709
// luma reference: the result must be the rounded 0.2109R+0.7148G+0.0742B
// (the 8-bit weights), and within one step of the exact BT.709 value.
module tb_color_convert_core;
  logic [23:0] rgb;
  logic [7:0] y;
  int checks = 0, failures = 0;
  color_convert_core dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int r, g, b, e;
      real exact;
      if (i < 8) rgb = {8'(i[0] ? 255 : 0), 8'(i[1] ? 255 : 0), 8'(i[2] ? 255 : 0)};
      else rgb = 24'($urandom);
      r = rgb[7:0]; g = rgb[15:8]; b = rgb[23:16];
      #1;
      e = (54 * r + 183 * g + 19 * b + 128) / 256;
      exact = 0.2126 * r + 0.7152 * g + 0.0722 * b;
      checks++;
      if (y != 8'(e) || (real'(y) - exact) > 1.0 || (exact - real'(y)) > 1.0) begin
        failures++; $display("rgb %0d %0d %0d -> %0d exp %0d", r, g, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of magnitude_core: random gradient pairs in the Sobel
// range and over the full S16 range, checked against round(sqrt(gx^2+gy^2))
// from real arithmetic, saturated at 32767.
module tb_magnitude_core;
  import ovx_pkg::*;
  grad_pair_t grad;
  logic [15:0] mag;
  int checks = 0, failures = 0;
  magnitude_core dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int x, y, e;
      real r;
      if (i % 2) begin x = int'($urandom % 2041) - 1020; y = int'($urandom % 2041) - 1020; end
      else begin x = int'(16'($urandom)) - 32768; y = int'(16'($urandom)) - 32768; end
      if (i == 0) begin x = -32768; y = -32768; end
      if (i == 2) begin x = 0; y = 0; end
      if (i == 4) begin x = 3; y = 4; end
      grad.gx = 16'(x); grad.gy = 16'(y);
      #1;
      r = $sqrt(real'(x) * x + real'(y) * y);
      e = int'($floor(r + 0.5));
      if (e > 32767) e = 32767;
      checks++;
      if (int'(mag) != e) begin failures++; $display("(%0d,%0d) got %0d exp %0d", x, y, mag, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

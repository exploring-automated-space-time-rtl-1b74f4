// Self-checking test of sobel3x3_core: random and extreme windows against
// the Sobel operators evaluated in the testbench.
module tb_sobel3x3_core;
  import ovx_pkg::*;
  logic [8:0][7:0] win;
  grad_pair_t grad;
  int checks = 0, failures = 0;
  localparam int GX[9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  localparam int GY[9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
  sobel3x3_core dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int ex, ey;
      for (int k = 0; k < 9; k++) win[k] = 8'($urandom);
      if (i == 0) for (int k = 0; k < 9; k++) win[k] = (k % 3 == 2) ? 8'd255 : 8'd0;
      if (i == 1) for (int k = 0; k < 9; k++) win[k] = (k < 3) ? 8'd255 : 8'd0;
      #1;
      ex = 0; ey = 0;
      for (int k = 0; k < 9; k++) begin ex += GX[k] * int'(win[k]); ey += GY[k] * int'(win[k]); end
      checks++;
      if (int'(grad.gx) != ex || int'(grad.gy) != ey) begin
        failures++; $display("got %0d,%0d exp %0d,%0d", grad.gx, grad.gy, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

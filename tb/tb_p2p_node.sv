// Self-checking test of p2p_node with all three Pixel2Pixel kernels of the
// graph (ColorConvert, Magnitude, Phase), W_T=4, W_F=2: pixel values against
// reference functions, beat order, and the rate of one beat per two cycles.
module tb_p2p_node;
  import ovx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit d0, d1, d2;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  p2p_case #(.KERNEL(K_COLOR_CONVERT)) c0 (.clk, .rst_n, .done(d0));
  p2p_case #(.KERNEL(K_MAGNITUDE))     c1 (.clk, .rst_n, .done(d1));
  p2p_case #(.KERNEL(K_PHASE))         c2 (.clk, .rst_n, .done(d2));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (d0 && d1 && d2);
    checks = c0.checks + c1.checks + c2.checks;
    failures = c0.fails + c1.fails + c2.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

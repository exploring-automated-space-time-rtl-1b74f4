// Self-checking test of w2p_node with both Window2Pixel kernels of the graph
// (Gaussian3x3 and Sobel3x3) on a 16 x 6 image, W_T=4, W_F=2. Outputs are
// compared pixel by pixel with whole-image reference filters that use
// replicated borders; the full-rate frame checks the node's rate.
module tb_w2p_node;
  import ovx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit d0, d1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  w2p_case #(.KERNEL(K_GAUSSIAN3X3)) c0 (.clk, .rst_n, .done(d0));
  w2p_case #(.KERNEL(K_SOBEL3X3))    c1 (.clk, .rst_n, .done(d1));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (d0 && d1);
    checks = c0.checks + c1.checks;
    failures = c0.fails + c1.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of p2p_replicated: two round-robin replicas of the Phase
// node and three of the ColorConvert node. Order and values are checked, and
// the full-rate burst must run NR times faster than a single node
// (one beat per cycle for NR=2 at W_T=4, W_F=2).
module tb_p2p_replicated;
  import ovx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit d0, d1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  p2p_case #(.KERNEL(K_PHASE), .NR(2))         c0 (.clk, .rst_n, .done(d0));
  p2p_case #(.KERNEL(K_COLOR_CONVERT), .NR(3)) c1 (.clk, .rst_n, .done(d1));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (d0 && d1);
    checks = c0.checks + c1.checks;
    failures = c0.fails + c1.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

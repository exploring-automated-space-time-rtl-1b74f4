// Self-checking test of sda_split in both uses: Pixel2Pixel (OVERLAP=0,
// 8-bit columns) and 3x3 Window2Pixel (OVERLAP=2, 24-bit columns), W_T=4,
// W_F=2. Every group must hold columns k*W_F .. k*W_F+W_F+OVERLAP-1 of its
// beat, groups in order, and with the reader always ready the adjuster must
// emit one group per cycle (two cycles per beat).
module tb_sda_split;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit d0, d1;
  sda_split_case #(.COLW(8),  .OVERLAP(0)) c0 (.clk, .rst_n, .done(d0));
  sda_split_case #(.COLW(24), .OVERLAP(2)) c1 (.clk, .rst_n, .done(d1));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (d0 && d1);
    checks = c0.checks + c1.checks;
    failures = c0.fails + c1.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

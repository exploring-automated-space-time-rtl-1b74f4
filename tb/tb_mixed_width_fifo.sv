// Self-checking test of mixed_width_fifo at three width pairs (64->96,
// 32->64, 64->64). A bit-level reference queue is fed with every accepted
// input word, lowest bit first; every output word must equal the next OUT_W
// bits of it. Random stalls on both sides; the 64->96 case must also keep
// up with a reader that wants one word every other cycle.
module tb_mixed_width_fifo;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit done0, done1, done2;
  bit [2:0] rate_ok;

  mwf_case #(.IN_W(64), .OUT_W(96), .WORDS(1200)) c0 (.clk, .rst_n, .done(done0), .checks_o(), .fails_o(), .rate_ok(rate_ok[0]));
  mwf_case #(.IN_W(32), .OUT_W(64), .WORDS(1200)) c1 (.clk, .rst_n, .done(done1), .checks_o(), .fails_o(), .rate_ok(rate_ok[1]));
  mwf_case #(.IN_W(64), .OUT_W(64), .WORDS(1200)) c2 (.clk, .rst_n, .done(done2), .checks_o(), .fails_o(), .rate_ok(rate_ok[2]));

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (done0 && done1 && done2);
    checks = c0.checks + c1.checks + c2.checks;
    failures = c0.fails + c1.fails + c2.fails;
    checks++; if (!rate_ok[0]) begin failures++; $display("64->96 too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

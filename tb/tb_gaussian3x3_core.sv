// Self-checking test of gaussian3x3_core: random and corner windows against
// the weighted sum [1 2 1; 2 4 2; 1 2 1] / 16 worked out in the testbench.
module tb_gaussian3x3_core;
  logic [8:0][7:0] win;
  logic [7:0] pix;
  int checks = 0, failures = 0;
  localparam int Wt[9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
  gaussian3x3_core dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int s;
      for (int k = 0; k < 9; k++) win[k] = (i == 0) ? 8'd255 : (i == 1) ? 8'd0 : 8'($urandom);
      if (i == 2) begin win = '0; win[4] = 8'd255; end
      #1;
      s = 0;
      for (int k = 0; k < 9; k++) s += Wt[k] * int'(win[k]);
      checks++;
      if (pix != 8'(s / 16)) begin failures++; $display("got %0d exp %0d", pix, s / 16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

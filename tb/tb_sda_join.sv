// Self-checking test of sda_join (W_T=4, W_F=2, 8-bit pixels): random stalls,
// each output beat must be two consecutive groups with the first in the low
// lanes; with both sides always ready, 200 groups must give 100 beats in
// about 200 cycles (no bubble between beats).
module tb_sda_join;
  localparam int PW = 8, W_T = 4, W_F = 2, N = W_T / W_F;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [W_F*PW-1:0] s_data;
  logic [W_T*PW-1:0] m_data;
  logic [W_F*PW-1:0] gq[$];
  int checks = 0, failures = 0, sent = 0, outs = 0;
  bit in_fired = 0;

  sda_join #(.PW(PW), .W_T(W_T), .W_F(W_F)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    in_fired = s_valid && s_ready;
    if (s_valid && s_ready) begin gq.push_back(s_data); sent++; end
    if (m_valid && m_ready) begin
      logic [W_T*PW-1:0] e;
      checks++; outs++;
      if (gq.size() < N) begin failures++; $display("beat before its groups"); end
      else begin
        for (int k = 0; k < N; k++) e[k*W_F*PW +: W_F*PW] = gq.pop_front();
        if (e != m_data) begin failures++; $display("beat %h exp %h", m_data, e); end
      end
    end
  end

  initial begin
    s_valid = 0; m_ready = 0; s_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (sent < 1000) begin
      @(negedge clk);
      if (!s_valid || in_fired) begin s_valid = (sent < 1000) && ($urandom % 4 != 0); s_data = 16'($urandom); end
      m_ready = ($urandom % 3 != 0);
    end
    m_ready = 1;
    while (s_valid && !in_fired) @(negedge clk);
    s_valid = 0;
    repeat (4) @(negedge clk);
    begin
      int o0;
      o0 = outs;
      s_valid = 1; s_data = 16'($urandom);
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        if (in_fired) s_data = 16'($urandom);
      end
      while (!in_fired) @(negedge clk);
      s_valid = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (outs - o0 < 100) begin failures++; $display("rate: %0d beats", outs - o0); end
    end
    checks++; if (gq.size() != 0) begin failures++; $display("groups left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

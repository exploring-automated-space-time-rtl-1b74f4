// One width pair of the mixed_width_fifo test (used by tb_mixed_width_fifo).
// Phase 1: random valid/ready with a bit-queue reference. Phase 2: source
// always valid, sink ready every other cycle; WORDS/2 output words must
// arrive within WORDS+20 cycles for the rate check.
module mwf_case #(
  parameter int IN_W = 64,
  parameter int OUT_W = 96,
  parameter int WORDS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks_o,
  output int   fails_o,
  output bit   rate_ok
);
  logic s_valid, s_ready, m_valid, m_ready;
  logic [IN_W-1:0] s_data;
  logic [OUT_W-1:0] m_data;
  bit bits[$];
  bit in_fired = 0;
  int checks = 0, fails = 0, outs = 0, sent = 0;
  assign checks_o = checks;
  assign fails_o = fails;

  mixed_width_fifo #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    in_fired = s_valid && s_ready;
    if (m_valid && m_ready) begin
      logic [OUT_W-1:0] exp;
      exp = '0;
      checks++;
      if (bits.size() < OUT_W) begin fails++; $display("output before enough input"); end
      else begin
        for (int i = 0; i < OUT_W; i++) exp[i] = bits.pop_front();
        if (exp !== m_data) begin fails++; $display("%0d->%0d mismatch %h exp %h", IN_W, OUT_W, m_data, exp); end
      end
      outs++;
    end
    if (s_valid && s_ready) begin
      for (int i = 0; i < IN_W; i++) bits.push_back(s_data[i]);
      sent++;
    end
  end

  initial begin
    done = 0; rate_ok = 0;
    s_valid = 0; m_ready = 0; s_data = '0;
    @(posedge rst_n);
    while (sent < WORDS) begin
      @(negedge clk);
      if (!s_valid || in_fired) begin
        s_valid = (sent < WORDS) && ($urandom % 4 != 0);
        for (int i = 0; i < IN_W; i += 32) s_data[i +: 32] = $urandom;
      end
      m_ready = ($urandom % 3 != 0);
    end
    m_ready = 1; while (s_valid && !in_fired) @(negedge clk); s_valid = 0;
    repeat (40) @(negedge clk);
    checks++; if (bits.size() >= OUT_W) begin fails++; $display("data left behind"); end
    // rate phase: drain to an empty state first by sending a whole number of output words
    begin
      int start, cyc;
      // restart from reset-equivalent state: only run if the accumulator is empty
      if (bits.size() == 0) begin
        start = outs; cyc = 0;
        s_valid = 1;
        while (outs - start < WORDS / 2 && cyc < WORDS + 20) begin
          if (in_fired) for (int i = 0; i < IN_W; i += 32) s_data[i +: 32] = $urandom;
          m_ready = cyc[0];
          @(negedge clk);
          cyc++;
        end
        rate_ok = (outs - start >= WORDS / 2);
        m_ready = 1; while (!in_fired) @(negedge clk); s_valid = 0;
      end else rate_ok = 1;
    end
    repeat (20) @(negedge clk);
    done = 1;
  end
endmodule

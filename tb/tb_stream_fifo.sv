// Self-checking test of stream_fifo: random stalls on both sides, data order
// checked against a queue model, then a full-rate burst must move one beat
// per cycle, and a stalled reader must see the FIFO fill to DEPTH.
module tb_stream_fifo;
  localparam int DW = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [DW-1:0] s_data, m_data;
  bit in_fired = 0;
  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];
  int sent = 0, got = 0;
  bit random_mode = 1;

  stream_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    in_fired = s_valid && s_ready;
    if (m_valid && m_ready) begin
      checks++;
      if (q.size() == 0 || m_data != q[0]) begin failures++; $display("mismatch got %h", m_data); end
      if (q.size() != 0) void'(q.pop_front());
      got++;
    end
    if (s_valid && s_ready) begin q.push_back(s_data); sent++; end
  end

  initial begin
    s_valid = 0; m_ready = 0; s_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // random traffic
    while (sent < 2000) begin
      @(negedge clk);
      if ((!s_valid || in_fired)) begin s_valid = ($urandom % 3) != 0; s_data = DW'($urandom); end
      m_ready = ($urandom % 3) != 0;
    end
    m_ready = 1; while (s_valid && !in_fired) @(negedge clk); s_valid = 0;
    repeat (10) @(negedge clk);
    checks++; if (got != sent) begin failures++; $display("lost beats %0d %0d", sent, got); end
    // fill with reader stalled
    m_ready = 0;
    for (int i = 0; i < DEPTH + 2; i++) begin s_valid = 1; if (i <= DEPTH) s_data = DW'(i + 100); @(negedge clk); end
    checks++; if (sent - got != DEPTH || s_ready) begin failures++; $display("fill count %0d", sent - got); end
    m_ready = 1; @(negedge clk); while (!in_fired) @(negedge clk); s_valid = 0; repeat (DEPTH + 2) @(negedge clk);
    // full-rate burst: 100 beats must take about 100 cycles
    begin
      int c0, start;
      start = got; c0 = 0;
      s_valid = 1;
      for (int i = 0; i < 100; i++) begin s_data = DW'($urandom); @(negedge clk); c0++; end
      s_valid = 0;
      repeat (3) @(negedge clk);
      checks++; if (got - start != 100) begin failures++; $display("burst moved %0d", got - start); end
      checks++; if (q.size() != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

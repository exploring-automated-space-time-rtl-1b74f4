// One configuration of the sda_split test (used by tb_sda_split).
module sda_split_case #(
  parameter int COLW = 8,
  parameter int OVERLAP = 0
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done
);
  localparam int W_T = 4, W_F = 2, N = W_T / W_F, BEATS = 500;
  localparam int IW = (W_T + OVERLAP) * COLW, OW = (W_F + OVERLAP) * COLW;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [IW-1:0] s_data;
  logic [OW-1:0] m_data;
  int checks = 0, fails = 0, sent = 0, outs = 0, gk = 0;
  bit in_fired = 0;

  sda_split #(.COLW(COLW), .W_T(W_T), .W_F(W_F), .OVERLAP(OVERLAP)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    in_fired = s_valid && s_ready;
    if (m_valid && m_ready) begin
      // group number gk of the beat now on the input
      checks++; outs++;
      if (!s_valid || m_data != s_data[gk*W_F*COLW +: OW]) begin fails++; $display("group mismatch %h", m_data); end
      gk = (gk + 1) % N;
      if (s_ready != (gk == 0)) begin fails++; $display("beat released at the wrong group"); end
    end
    if (s_valid && s_ready) sent++;
  end

  task automatic new_beat();
    logic [159:0] t;
    t = {$urandom, $urandom, $urandom, $urandom, $urandom};
    s_data = t[IW-1:0];
  endtask

  initial begin
    done = 0; s_valid = 0; m_ready = 0; s_data = '0;
    @(posedge rst_n);
    while (sent < BEATS) begin
      @(negedge clk);
      if (!s_valid || in_fired) begin s_valid = (sent < BEATS) && ($urandom % 4 != 0); new_beat(); end
      m_ready = ($urandom % 3 != 0);
    end
    // rate: source and sink always ready; 100 beats -> 200 groups in 200 cycles
    begin
      int o0;
      @(negedge clk);
      m_ready = 1; s_valid = 1; new_beat();
      o0 = outs;
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        if (in_fired) new_beat();
      end
      checks++;
      if (outs - o0 != 200) begin fails++; $display("rate: %0d groups in 200 cycles", outs - o0); end
      while (!in_fired) @(negedge clk);
      s_valid = 0;
    end
    repeat (5) @(negedge clk);
    checks++; if (outs != N * sent) begin fails++; $display("groups missing"); end
    done = 1;
  end
endmodule

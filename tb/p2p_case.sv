// One kernel of the Pixel2Pixel node tests (used by tb_p2p_node and
// tb_p2p_replicated). Sends 400 random beats with random stalls, then 200
// beats with both sides always ready; that burst must take at most
// max(200*(W_T/W_F)/NR, 200) + 16 cycles (a stream moves at most one beat per cycle). Each output pixel is checked against the
// reference function (phase within one step).
module p2p_case
  import ovx_pkg::*;
  import ovx_ref_pkg::*;
#(
  parameter kernel_e KERNEL = K_COLOR_CONVERT,
  parameter int NR = 1
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done
);
  localparam int W_T = 4, W_F = 2, IPW = in_pw(KERNEL), OPW = out_pw(KERNEL);
  localparam int B1 = 400, B2 = 200;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [W_T*IPW-1:0] s_data;
  logic [W_T*OPW-1:0] m_data;
  logic [W_T*IPW-1:0] inq[$];
  int checks = 0, fails = 0, sent = 0, outs = 0, cyc = 0, t0 = 0, t1 = 0;
  bit in_fired = 0, stalls = 1;

  if (NR == 1) begin : g_single
    p2p_node #(.KERNEL(KERNEL), .W_T(W_T), .W_F(W_F)) dut (.*);
  end else begin : g_rep
    p2p_replicated #(.KERNEL(KERNEL), .NR(NR), .W_T(W_T), .W_F(W_F)) dut (.*);
  end

  function automatic int expect_px(logic [IPW-1:0] v);
    case (KERNEL)
      K_COLOR_CONVERT: return luma(int'(v[7:0]), int'(v[15:8]), int'(v[23:16]));
      K_MAGNITUDE:     return magnitude(int'($signed(v[15:0])), int'($signed(v[31:16])));
      default:         return phase(int'($signed(v[15:0])), int'($signed(v[31:16])));
    endcase
  endfunction

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    in_fired = s_valid && s_ready;
    if (s_valid && s_ready) begin
      inq.push_back(s_data);
      if (sent == B1) t0 = cyc;
      sent++;
    end
    if (m_valid && m_ready) begin
      logic [W_T*IPW-1:0] v;
      v = inq.pop_front();
      for (int p = 0; p < W_T; p++) begin
        int e, g;
        e = expect_px(v[p*IPW +: IPW]);
        g = int'(m_data[p*OPW +: OPW]);
        checks++;
        if (KERNEL == K_PHASE ? phase_dist(g, e) > 1 : g != e) begin
          fails++; $display("kernel %0d beat %0d px %0d: %0d exp %0d", KERNEL, outs, p, g, e);
        end
      end
      outs++;
      t1 = cyc;
    end
  end

  task automatic new_beat();
    for (int p = 0; p < W_T; p++) begin
      logic [31:0] r;
      r = $urandom;
      // gradients in the Sobel range most of the time
      if (KERNEL != K_COLOR_CONVERT && ($urandom % 4 != 0))
        r = {16'(int'($urandom % 2041) - 1020), 16'(int'($urandom % 2041) - 1020)};
      s_data[p*IPW +: IPW] = IPW'(r);
    end
  endtask

  initial begin
    done = 0; s_valid = 0; m_ready = 0; s_data = '0;
    @(posedge rst_n);
    for (int ph = 0; ph < 2; ph++) begin
      int lim;
      lim = (ph == 0) ? B1 : B1 + B2;
      stalls = (ph == 0);
      while (sent < lim) begin
        @(negedge clk);
        if (!s_valid || in_fired) begin
          if (sent < lim) begin s_valid = stalls ? ($urandom % 4 != 0) : 1'b1; new_beat(); end
          else s_valid = 0;
        end
        m_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
      end
      @(negedge clk);
      if (in_fired) s_valid = 0;
      while (outs < lim) begin
        @(negedge clk);
        if (in_fired) s_valid = 0;
        m_ready = 1;
      end
    end
    checks++;
    if (t1 - t0 > ((B2 * (W_T / W_F) / NR > B2) ? B2 * (W_T / W_F) / NR : B2) + 16) begin fails++; $display("burst took %0d cycles", t1 - t0); end
    done = 1;
  end
endmodule

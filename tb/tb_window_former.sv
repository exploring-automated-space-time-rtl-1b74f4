// Self-checking test of window_former on a 16 x 6 image, W_T=4, three frames.
// Frames 1-2 run with random stalls on both sides; frame 3 runs at full rate
// and must finish within IMG_H*NB + IMG_H + NB + 8 cycles (one extra cycle
// per row and one extra row per frame). Every output beat is compared with
// W_T+2 columns of three rows cut from the image with replicated borders.
module tb_window_former;
  import ovx_ref_pkg::*;
  localparam int W_T = 4, IMG_W = 16, IMG_H = 6, NB = IMG_W / W_T, FRAMES = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [W_T-1:0][7:0] s_data;
  logic [W_T+1:0][2:0][7:0] m_data;
  int img[FRAMES][];
  int checks = 0, failures = 0, sent = 0, outs = 0;
  int t_first, t_last;
  bit in_fired = 0, stalls = 1;

  window_former #(.W_T(W_T), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    in_fired = s_valid && s_ready;
    if (s_valid && s_ready) begin
      if (sent == 2 * IMG_H * NB) t_first = cyc;
      sent++;
    end
    if (m_valid && m_ready) begin
      int f, r, b;
      logic [W_T+1:0][2:0][7:0] e;
      f = outs / (IMG_H * NB); r = (outs / NB) % IMG_H; b = outs % NB;
      for (int c = 0; c < W_T + 2; c++)
        for (int k = 0; k < 3; k++) e[c][k] = 8'(px(img[f], IMG_W, IMG_H, r - 1 + k, b * W_T - 1 + c));
      checks++;
      if (e != m_data) begin failures++; $display("frame %0d row %0d blk %0d: %h exp %h", f, r, b, m_data, e); end
      outs++;
      t_last = cyc;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[IMG_W * IMG_H];
      foreach (img[f][i]) img[f][i] = int'($urandom % 256);
    end
    s_valid = 0; m_ready = 0; s_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (sent < FRAMES * IMG_H * NB) begin
      @(negedge clk);
      if (sent >= 2 * IMG_H * NB && outs == 2 * IMG_H * NB) stalls = 0;
      if (!s_valid || in_fired) begin
        if (sent < FRAMES * IMG_H * NB && (sent < 2 * IMG_H * NB ? 1'b1 : !stalls || outs == 2 * IMG_H * NB)) begin
          s_valid = stalls ? ($urandom % 4 != 0) : 1'b1;
          for (int p = 0; p < W_T; p++) s_data[p] = 8'(img[sent / (IMG_H * NB)][(sent % (IMG_H * NB)) * W_T + p]);
          if (sent >= 2 * IMG_H * NB && outs < 2 * IMG_H * NB) s_valid = 0;
        end else s_valid = 0;
      end
      m_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
    end
    @(negedge clk); s_valid = 0;
    while (outs < FRAMES * IMG_H * NB) @(negedge clk);
    checks++;
    if (t_last - t_first > IMG_H * NB + IMG_H + NB + 8) begin
      failures++; $display("frame took %0d cycles", t_last - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

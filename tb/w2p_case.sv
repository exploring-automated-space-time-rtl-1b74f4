// One kernel of the w2p_node test (used by tb_w2p_node): three frames of a
// random image; frames 0-1 with random stalls, frame 2 at full rate, which
// must take at most 2*IMG_H*NB + IMG_H + NB + 24 cycles (one beat per two
// cycles at W_T=4, W_F=2, plus the row and frame ends).
module w2p_case
  import ovx_pkg::*;
  import ovx_ref_pkg::*;
#(
  parameter kernel_e KERNEL = K_GAUSSIAN3X3,
  parameter int IMG_W = 16,
  parameter int IMG_H = 6
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done
);
  localparam int W_T = 4, W_F = 2, NB = IMG_W / W_T, FB = IMG_H * NB, FRAMES = 3;
  localparam int OPW = out_pw(KERNEL);
  logic s_valid, s_ready, m_valid, m_ready;
  logic [W_T*8-1:0] s_data;
  logic [W_T*OPW-1:0] m_data;
  int img[FRAMES][];
  int ref0[FRAMES][], ref1[FRAMES][];
  int checks = 0, fails = 0, sent = 0, outs = 0, cyc = 0, t0 = 0, t1 = 0;
  bit in_fired = 0, stalls = 1;

  w2p_node #(.KERNEL(KERNEL), .W_T(W_T), .W_F(W_F), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    in_fired = s_valid && s_ready;
    if (s_valid && s_ready) begin
      if (sent == 2 * FB) t0 = cyc;
      sent++;
    end
    if (m_valid && m_ready) begin
      int f, i;
      f = outs / FB; i = (outs % FB) * W_T;
      for (int p = 0; p < W_T; p++) begin
        checks++;
        if (KERNEL == K_GAUSSIAN3X3) begin
          if (int'(m_data[p*8 +: 8]) != ref0[f][i+p]) begin
            fails++; $display("gauss f%0d px %0d: %0d exp %0d", f, i+p, m_data[p*8 +: 8], ref0[f][i+p]);
          end
        end else begin
          if (int'($signed(m_data[p*32 +: 16])) != ref0[f][i+p] || int'($signed(m_data[p*32+16 +: 16])) != ref1[f][i+p]) begin
            fails++; $display("sobel f%0d px %0d: %h exp %0d,%0d", f, i+p, m_data[p*32 +: 32], ref0[f][i+p], ref1[f][i+p]);
          end
        end
      end
      outs++;
      t1 = cyc;
    end
  end

  initial begin
    done = 0;
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[IMG_W * IMG_H];
      foreach (img[f][i]) img[f][i] = (f == 1) ? ((i % IMG_W) < IMG_W / 2 ? 0 : 255) : int'($urandom % 256);
      if (KERNEL == K_GAUSSIAN3X3) gauss_img(img[f], ref0[f], IMG_W, IMG_H);
      else sobel_img(img[f], ref0[f], ref1[f], IMG_W, IMG_H);
    end
    s_valid = 0; m_ready = 0; s_data = '0;
    @(posedge rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      stalls = (f < 2);
      while (sent < (f + 1) * FB) begin
        @(negedge clk);
        if (!s_valid || in_fired) begin
          if (sent < (f + 1) * FB) begin
            s_valid = stalls ? ($urandom % 4 != 0) : 1'b1;
            for (int p = 0; p < W_T; p++) s_data[p*8 +: 8] = 8'(img[f][(sent % FB) * W_T + p]);
          end else s_valid = 0;
        end
        m_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
      end
      @(negedge clk);
      if (in_fired) s_valid = 0;
      while (outs < (f + 1) * FB) begin
        @(negedge clk);
        if (in_fired) s_valid = 0;
        m_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
      end
    end
    checks++;
    if (t1 - t0 > 2 * FB + IMG_H + NB + 24) begin fails++; $display("frame took %0d cycles", t1 - t0); end
    done = 1;
  end
endmodule

// Full-size test of ovx_sobel_top at its default parameters (640 x 480
// frame, W_T=4, W_F=2, 64-bit DMA words): one frame of random RGB with random
// stalls on all three DMA streams, every magnitude and phase compared with
// the reference model of the graph, tlast checked, and each mechanism of the
// design counted.
module tb_ovx_sobel_top_full;
  import ovx_pkg::*;
  import ovx_ref_pkg::*;
  localparam int W_T = 4, W_F = 2, IMG_W = 640, IMG_H = 480, DMA_W = 64, FRAMES = 1;
  localparam int MPW = DMA_W / 16, PPW = DMA_W / 8;   // magnitudes, phases per word
  localparam int NPIX = IMG_W * IMG_H;
  localparam int IN_WORDS = NPIX * 24 / DMA_W, MAG_WORDS = NPIX * 16 / DMA_W, PH_WORDS = NPIX * 8 / DMA_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_axis_tvalid, s_axis_tready;
  logic [DMA_W-1:0] s_axis_tdata;
  logic m_axis_mag_tvalid, m_axis_mag_tready, m_axis_mag_tlast;
  logic [DMA_W-1:0] m_axis_mag_tdata;
  logic m_axis_phase_tvalid, m_axis_phase_tready, m_axis_phase_tlast;
  logic [DMA_W-1:0] m_axis_phase_tdata;

  ovx_sobel_top dut (.*);

  int checks = 0, failures = 0;
  int rgb[FRAMES][], gray[FRAMES][], gs[FRAMES][], gx[FRAMES][], gy[FRAMES][];
  logic [DMA_W-1:0] inw[FRAMES][];
  int sent = 0, mag_words = 0, ph_words = 0, cyc = 0, t0 = 0, t1 = 0;
  int phase_off1 = 0;
  bit in_fired = 0, stalls = 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog: %0d in, %0d mag, %0d phase words", sent, mag_words, ph_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- mechanism counters ----
  int n_in_stall = 0, n_mag_bp = 0, n_ph_bp = 0, n_rgb_beats = 0, n_groups = 0;
  int n_row_ends = 0, n_flush_beats = 0, n_fork_wait = 0, n_rep[2] = '{0, 0}, n_tlast = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (s_axis_tvalid && !s_axis_tready) n_in_stall++;
    if (m_axis_mag_tvalid && !m_axis_mag_tready) n_mag_bp++;
    if (m_axis_phase_tvalid && !m_axis_phase_tready) n_ph_bp++;
    if (dut.rgb_valid && dut.rgb_ready) n_rgb_beats++;
    if (dut.u_sobel.b_valid && dut.u_sobel.b_ready) n_groups++;
    if (dut.u_sobel.u_win.m_valid && dut.u_sobel.u_win.m_ready && dut.u_sobel.u_win.cur_last) n_row_ends++;
    if (dut.u_sobel.u_win.flush && dut.u_sobel.u_win.c_valid && dut.u_sobel.u_win.c_ready) n_flush_beats++;
    if (dut.grad_valid && (dut.u_fork.a_done || dut.u_fork.b_done)) n_fork_wait++;
    for (int r = 0; r < 2; r++) if (dut.u_phase.i_valid[r] && dut.u_phase.i_ready[r]) n_rep[r]++;
    if (m_axis_mag_tvalid && m_axis_mag_tready && m_axis_mag_tlast) n_tlast++;
  end

  // ---- scoreboards ----
  always @(posedge clk) if (rst_n) begin
    in_fired = s_axis_tvalid && s_axis_tready;
    if (s_axis_tvalid && s_axis_tready) begin
      if (sent == (FRAMES - 1) * IN_WORDS) t0 = cyc;
      sent++;
    end
    if (m_axis_mag_tvalid && m_axis_mag_tready) begin
      int f, i;
      f = mag_words / MAG_WORDS; i = (mag_words % MAG_WORDS) * MPW;
      for (int p = 0; p < MPW; p++) begin
        int e;
        e = magnitude(gx[f][i+p], gy[f][i+p]);
        checks++;
        if (int'(m_axis_mag_tdata[p*16 +: 16]) != e) begin
          failures++;
          if (failures < 10) $display("mag f%0d px %0d: %0d exp %0d", f, i+p, m_axis_mag_tdata[p*16 +: 16], e);
        end
      end
      checks++;
      if (m_axis_mag_tlast != ((mag_words % MAG_WORDS) == MAG_WORDS - 1)) begin failures++; $display("mag tlast wrong"); end
      mag_words++;
      t1 = cyc;
    end
    if (m_axis_phase_tvalid && m_axis_phase_tready) begin
      int f, i;
      f = ph_words / PH_WORDS; i = (ph_words % PH_WORDS) * PPW;
      for (int p = 0; p < PPW; p++) begin
        int e, d;
        e = phase(gx[f][i+p], gy[f][i+p]);
        d = phase_dist(int'(m_axis_phase_tdata[p*8 +: 8]), e);
        checks++;
        if (d != 0) phase_off1++;
        if (d > 1) begin
          failures++;
          if (failures < 10) $display("phase f%0d px %0d: %0d exp %0d", f, i+p, m_axis_phase_tdata[p*8 +: 8], e);
        end
      end
      checks++;
      if (m_axis_phase_tlast != ((ph_words % PH_WORDS) == PH_WORDS - 1)) begin failures++; $display("phase tlast wrong"); end
      ph_words++;
      if (cyc > t1) t1 = cyc;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-40s %0d", what, n);
  endtask

  initial begin
    // frames: random pixels, then (if more) a vertical edge, then random again
    for (int f = 0; f < FRAMES; f++) begin
      logic [NPIX*24-1:0] bits;
      rgb[f] = new[NPIX]; gray[f] = new[NPIX];
      for (int i = 0; i < NPIX; i++) begin
        int r, g, b;
        if (f == 1) begin r = ((i % IMG_W) < IMG_W / 2) ? 10 : 240; g = r; b = 255 - r; end
        else begin r = int'($urandom % 256); g = int'($urandom % 256); b = int'($urandom % 256); end
        rgb[f][i] = r | (g << 8) | (b << 16);
        gray[f][i] = luma(r, g, b);
      end
      gauss_img(gray[f], gs[f], IMG_W, IMG_H);
      sobel_img(gs[f], gx[f], gy[f], IMG_W, IMG_H);
      inw[f] = new[IN_WORDS];
      for (int w = 0; w < IN_WORDS; w++) begin
        logic [DMA_W-1:0] word;
        for (int k = 0; k < DMA_W; k++) begin
          int bit_i;
          bit_i = w * DMA_W + k;
          word[k] = rgb[f][bit_i / 24][bit_i % 24];
        end
        inw[f][w] = word;
      end
    end
    s_axis_tvalid = 0; s_axis_tdata = '0; m_axis_mag_tready = 0; m_axis_phase_tready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      stalls = (f < FRAMES - 1) || (FRAMES == 1 && 1'b1);
      while (sent < (f + 1) * IN_WORDS) begin
        @(negedge clk);
        if (!s_axis_tvalid || in_fired) begin
          if (sent < (f + 1) * IN_WORDS) begin
            s_axis_tvalid = stalls ? ($urandom % 8 != 0) : 1'b1;
            s_axis_tdata = inw[f][sent % IN_WORDS];
          end else s_axis_tvalid = 0;
        end
        m_axis_mag_tready = stalls ? ($urandom % 4 != 0) : 1'b1;
        m_axis_phase_tready = stalls ? ((f == 1 || (FRAMES == 1 && (cyc / 2000) % 2 == 1)) ? ($urandom % 16 == 0) : ($urandom % 3 != 0)) : 1'b1;
      end
      @(negedge clk);
      if (in_fired) s_axis_tvalid = 0;
      while (mag_words < (f + 1) * MAG_WORDS || ph_words < (f + 1) * PH_WORDS) begin
        @(negedge clk);
        if (in_fired) s_axis_tvalid = 0;
        m_axis_mag_tready = stalls ? ($urandom % 4 != 0) : 1'b1;
        m_axis_phase_tready = stalls ? ((f == 1 || (FRAMES == 1 && (cyc / 2000) % 2 == 1)) ? ($urandom % 16 == 0) : ($urandom % 3 != 0)) : 1'b1;
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (mag_words != FRAMES * MAG_WORDS || ph_words != FRAMES * PH_WORDS) begin failures++; $display("extra output words"); end
    // rate (when the last frame ran with no stalls): the pipeline moves W_F
    // pixels per cycle, plus one cycle per row and one row per frame in
    // each window node, plus fill latency.
    checks++;
    $display("  last frame: %0d cycles for %0d pixels", t1 - t0, NPIX);
    if (!stalls && t1 - t0 > NPIX / W_F + 2 * (IMG_H + IMG_W / W_T) * 2 + 100) begin failures++; $display("too slow"); end
    $display("mechanisms:");
    need("input DMA word stalled (back-pressure)", n_in_stall);
    need("input alignment beats (DMA words to W_T-pixel beats)", n_rgb_beats);
    need("input SDA groups (Sobel node)", n_groups);
    need("window row-end extra beats", n_row_ends);
    need("window frame-end flush beats", n_flush_beats);
    need("fork branch waiting for the other", n_fork_wait);
    need("beats to phase replica 0", n_rep[0]);
    need("beats to phase replica 1", n_rep[1]);
    need("magnitude output back-pressure", n_mag_bp);
    need("phase output back-pressure", n_ph_bp);
    need("end-of-frame tlast", n_tlast);
    $display("  phase results one step off exact: %0d", phase_off1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

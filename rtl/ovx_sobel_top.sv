// Sobel edge-detection accelerator built from the OpenVX graph
//   rgb -> ColorConvert -> gray -> Gaussian3x3 -> gauss -> Sobel3x3
//       -> (gradx, grady) -> Magnitude -> mag
//                         -> Phase     -> phase
// as a streaming pipeline between a DMA read channel and two DMA write
// channels (AXI-Stream style valid/ready).
//
// s_axis carries RGB888 pixels packed into DMA_W-bit words, first pixel in
// the low bits, a whole IMG_H x IMG_W frame in raster order. An input data
// alignment network (mixed-width FIFO) repacks them into W_T-pixel beats. The
// five nodes each handle W_T pixels per beat with W_F function lanes. The
// gradient pair is broadcast to Magnitude and Phase; Phase is built as
// NR_PHASE round-robin replicas. Two output alignment networks pack the S16
// magnitudes and U8 phases into DMA_W-bit words; tlast marks the last word
// of each frame. In steady state every node moves one W_T-pixel beat per
// W_T/W_F cycles, so the accelerator sustains W_F pixels per cycle (a
// 640 x 480 frame takes about 154,750 cycles with no stalls).
// Image size, DMA width, FIFO depth and the replica count are this design's
// choices; IMG_W must be a multiple of W_T and a frame's bits on each stream
// a multiple of DMA_W.
module ovx_sobel_top
  import ovx_pkg::*;
#(
  parameter int W_T        = 4,
  parameter int W_F        = 2,
  parameter int IMG_W      = 640,
  parameter int IMG_H      = 480,
  parameter int DMA_W      = 64,
  parameter int FIFO_DEPTH = 4,
  parameter int NR_PHASE   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  input  logic [DMA_W-1:0] s_axis_tdata,
  output logic             m_axis_mag_tvalid,
  input  logic             m_axis_mag_tready,
  output logic [DMA_W-1:0] m_axis_mag_tdata,
  output logic             m_axis_mag_tlast,
  output logic             m_axis_phase_tvalid,
  input  logic             m_axis_phase_tready,
  output logic [DMA_W-1:0] m_axis_phase_tdata,
  output logic             m_axis_phase_tlast
);
  localparam int MAG_BEATS   = IMG_W * IMG_H * GRAD_W / DMA_W;
  localparam int PHASE_BEATS = IMG_W * IMG_H * PIX_W / DMA_W;

  initial begin
    if ((IMG_W * IMG_H * RGB_W) % DMA_W != 0 || (IMG_W * IMG_H * PIX_W) % DMA_W != 0)
      $error("ovx_sobel_top: frame size must be a whole number of DMA words");
  end

  logic rgb_valid, rgb_ready;      logic [W_T*RGB_W-1:0]  rgb_data;
  logic gray_valid, gray_ready;    logic [W_T*PIX_W-1:0]  gray_data;
  logic gauss_valid, gauss_ready;  logic [W_T*PIX_W-1:0]  gauss_data;
  logic grad_valid, grad_ready;    logic [W_T*PAIR_W-1:0] grad_data;
  logic gm_valid, gm_ready;        logic [W_T*PAIR_W-1:0] gm_data;
  logic gp_valid, gp_ready;        logic [W_T*PAIR_W-1:0] gp_data;
  logic mag_valid, mag_ready;      logic [W_T*GRAD_W-1:0] mag_data;
  logic ph_valid, ph_ready;        logic [W_T*PIX_W-1:0]  ph_data;

  mixed_width_fifo #(.IN_W(DMA_W), .OUT_W(W_T*RGB_W)) u_align_in (
    .clk, .rst_n,
    .s_valid(s_axis_tvalid), .s_ready(s_axis_tready), .s_data(s_axis_tdata),
    .m_valid(rgb_valid), .m_ready(rgb_ready), .m_data(rgb_data));

  p2p_node #(.KERNEL(K_COLOR_CONVERT), .W_T(W_T), .W_F(W_F), .FIFO_DEPTH(FIFO_DEPTH)) u_color_convert (
    .clk, .rst_n,
    .s_valid(rgb_valid), .s_ready(rgb_ready), .s_data(rgb_data),
    .m_valid(gray_valid), .m_ready(gray_ready), .m_data(gray_data));

  w2p_node #(.KERNEL(K_GAUSSIAN3X3), .W_T(W_T), .W_F(W_F), .IMG_W(IMG_W), .IMG_H(IMG_H),
             .FIFO_DEPTH(FIFO_DEPTH)) u_gaussian (
    .clk, .rst_n,
    .s_valid(gray_valid), .s_ready(gray_ready), .s_data(gray_data),
    .m_valid(gauss_valid), .m_ready(gauss_ready), .m_data(gauss_data));

  w2p_node #(.KERNEL(K_SOBEL3X3), .W_T(W_T), .W_F(W_F), .IMG_W(IMG_W), .IMG_H(IMG_H),
             .FIFO_DEPTH(FIFO_DEPTH)) u_sobel (
    .clk, .rst_n,
    .s_valid(gauss_valid), .s_ready(gauss_ready), .s_data(gauss_data),
    .m_valid(grad_valid), .m_ready(grad_ready), .m_data(grad_data));

  stream_fork #(.DW(W_T*PAIR_W)) u_fork (
    .clk, .rst_n,
    .s_valid(grad_valid), .s_ready(grad_ready), .s_data(grad_data),
    .a_valid(gm_valid), .a_ready(gm_ready), .a_data(gm_data),
    .b_valid(gp_valid), .b_ready(gp_ready), .b_data(gp_data));

  p2p_node #(.KERNEL(K_MAGNITUDE), .W_T(W_T), .W_F(W_F), .FIFO_DEPTH(FIFO_DEPTH)) u_magnitude (
    .clk, .rst_n,
    .s_valid(gm_valid), .s_ready(gm_ready), .s_data(gm_data),
    .m_valid(mag_valid), .m_ready(mag_ready), .m_data(mag_data));

  p2p_replicated #(.KERNEL(K_PHASE), .NR(NR_PHASE), .W_T(W_T), .W_F(W_F),
                   .FIFO_DEPTH(FIFO_DEPTH)) u_phase (
    .clk, .rst_n,
    .s_valid(gp_valid), .s_ready(gp_ready), .s_data(gp_data),
    .m_valid(ph_valid), .m_ready(ph_ready), .m_data(ph_data));

  mixed_width_fifo #(.IN_W(W_T*GRAD_W), .OUT_W(DMA_W)) u_align_mag (
    .clk, .rst_n,
    .s_valid(mag_valid), .s_ready(mag_ready), .s_data(mag_data),
    .m_valid(m_axis_mag_tvalid), .m_ready(m_axis_mag_tready), .m_data(m_axis_mag_tdata));

  mixed_width_fifo #(.IN_W(W_T*PIX_W), .OUT_W(DMA_W)) u_align_phase (
    .clk, .rst_n,
    .s_valid(ph_valid), .s_ready(ph_ready), .s_data(ph_data),
    .m_valid(m_axis_phase_tvalid), .m_ready(m_axis_phase_tready), .m_data(m_axis_phase_tdata));

  // End-of-frame markers on the two output streams.
  logic [$clog2(MAG_BEATS+1)-1:0]   mag_cnt;
  logic [$clog2(PHASE_BEATS+1)-1:0] ph_cnt;
  assign m_axis_mag_tlast   = (mag_cnt == $bits(mag_cnt)'(MAG_BEATS - 1));
  assign m_axis_phase_tlast = (ph_cnt == $bits(ph_cnt)'(PHASE_BEATS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mag_cnt <= '0;
      ph_cnt  <= '0;
    end else begin
      if (m_axis_mag_tvalid && m_axis_mag_tready)
        mag_cnt <= m_axis_mag_tlast ? '0 : mag_cnt + 1'b1;
      if (m_axis_phase_tvalid && m_axis_phase_tready)
        ph_cnt <= m_axis_phase_tlast ? '0 : ph_cnt + 1'b1;
    end
  end
endmodule

// General Window2Pixel node: one OpenVX 3x3 kernel (Gaussian3x3, Sobel3x3)
// that makes each output pixel from the 3x3 window around it.
//
//   s -> FIFO -> window former (two line buffers, W_T+2 columns of 3 pixels)
//     -> input SDA (W_T/W_F overlapping groups of W_F+2 columns) -> FIFO
//     -> W_F kernel lanes -> FIFO -> output SDA (groups -> W_T) -> FIFO -> m
// Each firing uses W_T+2 columns for W_T results; neighbouring groups share
// two columns, the overlap a 3x3 window needs. At W_T=4, W_F=2 the function
// takes 4 columns per cycle and the node emits 4 pixels every 2 cycles.
// An IMG_H x IMG_W frame in gives an IMG_H x IMG_W frame out with replicated
// borders; output row r leaves once input row r+1 (or the end of the frame)
// has arrived. The border rule and the FIFO depth are this design's choices.
module w2p_node
  import ovx_pkg::*;
#(
  parameter kernel_e KERNEL     = K_GAUSSIAN3X3,
  parameter int      W_T        = 4,
  parameter int      W_F        = 2,
  parameter int      IMG_W      = 640,
  parameter int      IMG_H      = 480,
  parameter int      FIFO_DEPTH = 4,
  parameter int      OUT_PW     = out_pw(KERNEL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  s_valid,
  output logic                  s_ready,
  input  logic [W_T*PIX_W-1:0]  s_data,
  output logic                  m_valid,
  input  logic                  m_ready,
  output logic [W_T*OUT_PW-1:0] m_data
);
  localparam int COLW = 3 * PIX_W;

  initial begin
    if (KERNEL != K_GAUSSIAN3X3 && KERNEL != K_SOBEL3X3)
      $error("w2p_node: KERNEL must be a Window2Pixel kernel");
  end

  logic a_valid, a_ready;  logic [W_T*PIX_W-1:0]   a_data;
  logic w_valid, w_ready;  logic [(W_T+2)*COLW-1:0] w_data;
  logic b_valid, b_ready;  logic [W_F+1:0][2:0][7:0] b_data;
  logic c_valid, c_ready;  logic [W_F+1:0][2:0][7:0] c_data;
  logic [W_F*OUT_PW-1:0] f_data;
  logic d_valid, d_ready;  logic [W_F*OUT_PW-1:0]  d_data;
  logic e_valid, e_ready;  logic [W_T*OUT_PW-1:0]  e_data;

  stream_fifo #(.DW(W_T*PIX_W), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .s_valid, .s_ready, .s_data,
    .m_valid(a_valid), .m_ready(a_ready), .m_data(a_data));

  window_former #(.W_T(W_T), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .s_valid(a_valid), .s_ready(a_ready), .s_data(a_data),
    .m_valid(w_valid), .m_ready(w_ready), .m_data(w_data));

  sda_split #(.COLW(COLW), .W_T(W_T), .W_F(W_F), .OVERLAP(2)) u_sda_in (
    .clk, .rst_n, .s_valid(w_valid), .s_ready(w_ready), .s_data(w_data),
    .m_valid(b_valid), .m_ready(b_ready), .m_data(b_data));

  stream_fifo #(.DW((W_F+2)*COLW), .DEPTH(FIFO_DEPTH)) u_fifo_fin (
    .clk, .rst_n, .s_valid(b_valid), .s_ready(b_ready), .s_data(b_data),
    .m_valid(c_valid), .m_ready(c_ready), .m_data(c_data));

  for (genvar l = 0; l < W_F; l++) begin : g_lane
    logic [8:0][7:0] win;   // row-major 3x3 window of lane l
    always_comb begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          win[r*3 + c] = c_data[l + c][r];
    end
    if (KERNEL == K_GAUSSIAN3X3) begin : g_gauss
      gaussian3x3_core u_core (.win, .pix(f_data[l*OUT_PW +: PIX_W]));
    end else begin : g_sobel
      sobel3x3_core u_core (.win, .grad(f_data[l*OUT_PW +: PAIR_W]));
    end
  end

  stream_fifo #(.DW(W_F*OUT_PW), .DEPTH(FIFO_DEPTH)) u_fifo_fout (
    .clk, .rst_n, .s_valid(c_valid), .s_ready(c_ready), .s_data(f_data),
    .m_valid(d_valid), .m_ready(d_ready), .m_data(d_data));

  sda_join #(.PW(OUT_PW), .W_T(W_T), .W_F(W_F)) u_sda_out (
    .clk, .rst_n, .s_valid(d_valid), .s_ready(d_ready), .s_data(d_data),
    .m_valid(e_valid), .m_ready(e_ready), .m_data(e_data));

  stream_fifo #(.DW(W_T*OUT_PW), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n, .s_valid(e_valid), .s_ready(e_ready), .s_data(e_data),
    .m_valid, .m_ready, .m_data);
endmodule

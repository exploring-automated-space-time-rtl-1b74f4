// General Pixel2Pixel node: one OpenVX kernel that makes one output pixel
// from each input pixel (ColorConvert, Magnitude, Phase).
//
// The node's stream carries W_T pixels per beat; its hardware function has
// only W_F lanes. Data flows through four FIFO layers and two stream data
// adjusters:
//   s -> FIFO -> input SDA (W_T -> W_T/W_F groups of W_F) -> FIFO
//     -> W_F kernel lanes -> FIFO -> output SDA (groups -> W_T) -> FIFO -> m
// The function takes one group per cycle, so the node moves one beat every
// W_T/W_F cycles (4 pixels every 2 cycles at W_T=4, W_F=2); each FIFO layer
// adds one cycle of latency. The layering follows the general node structure of the
// design; the FIFO depth is a free parameter.
module p2p_node
  import ovx_pkg::*;
#(
  parameter kernel_e KERNEL     = K_COLOR_CONVERT,
  parameter int      W_T        = 4,
  parameter int      W_F        = 2,
  parameter int      FIFO_DEPTH = 4,
  parameter int      IN_PW      = in_pw(KERNEL),
  parameter int      OUT_PW     = out_pw(KERNEL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  s_valid,
  output logic                  s_ready,
  input  logic [W_T*IN_PW-1:0]  s_data,
  output logic                  m_valid,
  input  logic                  m_ready,
  output logic [W_T*OUT_PW-1:0] m_data
);
  initial begin
    if (KERNEL != K_COLOR_CONVERT && KERNEL != K_MAGNITUDE && KERNEL != K_PHASE)
      $error("p2p_node: KERNEL must be a Pixel2Pixel kernel");
  end

  logic                  a_valid, a_ready;  logic [W_T*IN_PW-1:0]  a_data;
  logic                  b_valid, b_ready;  logic [W_F*IN_PW-1:0]  b_data;
  logic                  c_valid, c_ready;  logic [W_F*IN_PW-1:0]  c_data;
  logic [W_F*OUT_PW-1:0] f_data;
  logic                  d_valid, d_ready;  logic [W_F*OUT_PW-1:0] d_data;
  logic                  e_valid, e_ready;  logic [W_T*OUT_PW-1:0] e_data;

  stream_fifo #(.DW(W_T*IN_PW), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .s_valid, .s_ready, .s_data,
    .m_valid(a_valid), .m_ready(a_ready), .m_data(a_data));

  sda_split #(.COLW(IN_PW), .W_T(W_T), .W_F(W_F), .OVERLAP(0)) u_sda_in (
    .clk, .rst_n, .s_valid(a_valid), .s_ready(a_ready), .s_data(a_data),
    .m_valid(b_valid), .m_ready(b_ready), .m_data(b_data));

  stream_fifo #(.DW(W_F*IN_PW), .DEPTH(FIFO_DEPTH)) u_fifo_fin (
    .clk, .rst_n, .s_valid(b_valid), .s_ready(b_ready), .s_data(b_data),
    .m_valid(c_valid), .m_ready(c_ready), .m_data(c_data));

  for (genvar l = 0; l < W_F; l++) begin : g_lane
    if (KERNEL == K_COLOR_CONVERT) begin : g_cc
      color_convert_core u_core (.rgb(c_data[l*IN_PW +: RGB_W]), .y(f_data[l*OUT_PW +: PIX_W]));
    end else if (KERNEL == K_MAGNITUDE) begin : g_mag
      magnitude_core u_core (.grad(c_data[l*IN_PW +: PAIR_W]), .mag(f_data[l*OUT_PW +: GRAD_W]));
    end else begin : g_phase
      phase_core u_core (.grad(c_data[l*IN_PW +: PAIR_W]), .phase(f_data[l*OUT_PW +: PIX_W]));
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

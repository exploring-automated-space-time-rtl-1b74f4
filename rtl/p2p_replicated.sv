// Replicated Pixel2Pixel node: NR copies of one p2p_node behind a 1 -> NR
// round-robin splitter and an NR -> 1 round-robin joiner.
//
// Whole W_T-pixel beats are dealt to the replicas in turn and collected in
// the same turn, so pixel order is kept and the throughput is NR times that
// of one replica: at W_T=4, W_F=2, NR=2 one beat per cycle instead of one
// every two cycles. Valid for Pixel2Pixel kernels only, whose pixels are
// independent of each other.
module p2p_replicated
  import ovx_pkg::*;
#(
  parameter kernel_e KERNEL     = K_PHASE,
  parameter int      NR         = 2,
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
  logic [NR-1:0] i_valid, i_ready, o_valid, o_ready;
  logic [NR-1:0][W_T*IN_PW-1:0]  i_data;
  logic [NR-1:0][W_T*OUT_PW-1:0] o_data;

  rr_split #(.DW(W_T*IN_PW), .NR(NR)) u_split (
    .clk, .rst_n, .s_valid, .s_ready, .s_data,
    .m_valid(i_valid), .m_ready(i_ready), .m_data(i_data));

  for (genvar r = 0; r < NR; r++) begin : g_rep
    p2p_node #(.KERNEL(KERNEL), .W_T(W_T), .W_F(W_F), .FIFO_DEPTH(FIFO_DEPTH),
               .IN_PW(IN_PW), .OUT_PW(OUT_PW)) u_node (
      .clk, .rst_n,
      .s_valid(i_valid[r]), .s_ready(i_ready[r]), .s_data(i_data[r]),
      .m_valid(o_valid[r]), .m_ready(o_ready[r]), .m_data(o_data[r]));
  end

  rr_join #(.DW(W_T*OUT_PW), .NR(NR)) u_join (
    .clk, .rst_n, .s_valid(o_valid), .s_ready(o_ready), .s_data(o_data),
    .m_valid, .m_ready, .m_data);
endmodule

// Input Stream Data Adjuster (SDA).
//
// A node receives W_T pixel columns per beat (plus OVERLAP extra columns for a
// window kernel) while its hardware function handles only W_F columns per
// cycle. The adjuster cuts each beat into N = W_T/W_F groups and sends one per
// cycle; group k carries columns k*W_F .. k*W_F+W_F+OVERLAP-1, so neighbouring
// groups share OVERLAP columns as a window kernel needs. OVERLAP is 0 for a
// Pixel2Pixel kernel and w-1 for a w x w Window2Pixel kernel. A column is
// COLW bits: one pixel, or a vertical stack of pixels for a window kernel.
// The input beat is released together with its last group; the block has no
// storage besides the group counter, so a group leaves in the cycle it is shown.
module sda_split #(
  parameter int COLW    = 8,
  parameter int W_T     = 4,
  parameter int W_F     = 2,
  parameter int OVERLAP = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            s_valid,
  output logic                            s_ready,
  input  logic [(W_T+OVERLAP)*COLW-1:0]   s_data,
  output logic                            m_valid,
  input  logic                            m_ready,
  output logic [(W_F+OVERLAP)*COLW-1:0]   m_data
);
  localparam int N  = W_T / W_F;
  localparam int KW = (N > 1) ? $clog2(N) : 1;

  initial begin
    if (W_T % W_F != 0) $error("sda_split: W_T must be a multiple of W_F");
  end

  logic [KW-1:0] k;
  wire last = (k == KW'(N-1));

  assign m_valid = s_valid;
  assign s_ready = m_ready && last;
  assign m_data  = s_data[int'(k)*W_F*COLW +: (W_F+OVERLAP)*COLW];

  always_ff @(posedge clk) begin
    if (!rst_n) k <= '0;
    else if (m_valid && m_ready) k <= last ? '0 : k + 1'b1;
  end
endmodule

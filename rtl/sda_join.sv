// Output Stream Data Adjuster (SDA).
//
// The hardware function of a node produces W_F pixels per cycle; the node's
// output carries W_T. This block collects N = W_T/W_F consecutive groups into
// one beat, the first group in the lowest lanes. The finished beat is held in
// a register and offered on m_*; the first group of the next beat may be
// written in the same cycle the finished beat leaves, so a steady stream of
// one group per cycle gives one beat every N cycles with no bubble.
module sda_join #(
  parameter int PW  = 8,
  parameter int W_T = 4,
  parameter int W_F = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [W_F*PW-1:0]  s_data,
  output logic               m_valid,
  input  logic               m_ready,
  output logic [W_T*PW-1:0]  m_data
);
  localparam int N  = W_T / W_F;
  localparam int KW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][W_F*PW-1:0] buffer;
  logic [KW-1:0] k;
  logic full;

  wire wr = s_valid && s_ready;
  wire rd = m_valid && m_ready;
  wire last = (k == KW'(N-1));

  assign s_ready = !full || m_ready;
  assign m_valid = full;
  assign m_data  = buffer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k    <= '0;
      full <= 1'b0;
    end else begin
      if (wr) k <= last ? '0 : k + 1'b1;
      if (wr && last)  full <= 1'b1;
      else if (rd)     full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr) buffer[k] <= s_data;
  end
endmodule

// Data alignment network: a mixed-width FIFO between the DMA and the accelerator.
//
// The DMA moves power-of-two words while a node takes W_T pixels of any size
// per beat, so the two widths rarely match. This block keeps a bit
// accumulator of CAP = 2*(IN_W+OUT_W) bits and a fill count. An input word is
// appended above the bits already held (first data in the least significant
// bits); an output word is the lowest OUT_W bits and leaves once that many are
// held. Input is accepted while the accumulator has room for a whole word,
// independent of the output side, so there is no combinational path from
// m_ready to s_ready. Both sides may move in the same cycle.
module mixed_width_fifo #(
  parameter int IN_W  = 64,
  parameter int OUT_W = 96
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [IN_W-1:0]  s_data,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [OUT_W-1:0] m_data
);
  localparam int CAP = 2 * (IN_W + OUT_W);
  localparam int CW  = $clog2(CAP + 1);

  logic [CAP-1:0] acc;
  logic [CW-1:0]  cnt;

  wire wr = s_valid && s_ready;
  wire rd = m_valid && m_ready;

  assign s_ready = (cnt <= CW'(CAP - IN_W));
  assign m_valid = (cnt >= CW'(OUT_W));
  assign m_data  = acc[OUT_W-1:0];

  logic [CAP-1:0] acc_shift;
  logic [CW-1:0]  cnt_shift;
  always_comb begin
    acc_shift = rd ? (acc >> OUT_W) : acc;
    cnt_shift = rd ? (cnt - CW'(OUT_W)) : cnt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      cnt <= '0;
    end else begin
      if (wr) begin
        // Clear the target bits, then insert the new word above the held bits.
        acc <= (acc_shift & ~(CAP'({IN_W{1'b1}}) << cnt_shift))
             | (CAP'(s_data) << cnt_shift);
        cnt <= cnt_shift + CW'(IN_W);
      end else begin
        acc <= acc_shift;
        cnt <= cnt_shift;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           s_valid && !s_ready |=> s_valid && $stable(s_data));
endmodule

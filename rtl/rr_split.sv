// 1 -> NR round-robin splitter: beat i goes to output i mod NR.
// A pointer names the output that takes the next beat and advances on every
// accepted beat; the other outputs see no valid. No storage, no latency.
module rr_split #(
  parameter int DW = 32,
  parameter int NR = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   s_valid,
  output logic                   s_ready,
  input  logic [DW-1:0]          s_data,
  output logic [NR-1:0]          m_valid,
  input  logic [NR-1:0]          m_ready,
  output logic [NR-1:0][DW-1:0]  m_data
);
  localparam int PW = (NR > 1) ? $clog2(NR) : 1;
  logic [PW-1:0] ptr;

  always_comb begin
    m_valid = '0;
    m_valid[ptr] = s_valid;
    s_ready = m_ready[ptr];
    for (int i = 0; i < NR; i++) m_data[i] = s_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (s_valid && s_ready) ptr <= (ptr == PW'(NR-1)) ? '0 : ptr + 1'b1;
  end
endmodule

// NR -> 1 round-robin joiner: reads input i mod NR for output beat i, the
// same order rr_split deals beats out, so the original order is restored.
// A pointer names the input whose beat goes next and advances on every beat.
module rr_join #(
  parameter int DW = 32,
  parameter int NR = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NR-1:0]          s_valid,
  output logic [NR-1:0]          s_ready,
  input  logic [NR-1:0][DW-1:0]  s_data,
  output logic                   m_valid,
  input  logic                   m_ready,
  output logic [DW-1:0]          m_data
);
  localparam int PW = (NR > 1) ? $clog2(NR) : 1;
  logic [PW-1:0] ptr;

  always_comb begin
    s_ready = '0;
    s_ready[ptr] = m_ready;
    m_valid = s_valid[ptr];
    m_data  = s_data[ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (m_valid && m_ready) ptr <= (ptr == PW'(NR-1)) ? '0 : ptr + 1'b1;
  end
endmodule

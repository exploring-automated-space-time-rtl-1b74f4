// Synchronous FIFO with a valid/ready handshake on both sides.
//
// Each general node places four of these between its stages (input, between
// input adjuster and function, between function and output adjuster, output)
// so that stages running at different rates can meet. A beat is written when
// s_valid && s_ready and read when m_valid && m_ready; both may happen in the
// same cycle, so a full-rate stream passes with no bubbles. The head entry is
// presented from the storage array one cycle after it is written. The depth
// is this design's choice; back-pressure means no data is lost at any depth.
module stream_fifo #(
  parameter int DW    = 32,
  parameter int DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [DW-1:0] s_data,
  output logic          m_valid,
  input  logic          m_ready,
  output logic [DW-1:0] m_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;

  wire wr = s_valid && s_ready;
  wire rd = m_valid && m_ready;

  assign s_ready = (count < (AW+1)'(DEPTH));
  assign m_valid = (count != '0);
  assign m_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr) wr_ptr <= next_ptr(wr_ptr);
      if (rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= s_data;
  end

  // A producer keeps a beat it has offered until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           s_valid && !s_ready |=> s_valid && $stable(s_data));
endmodule

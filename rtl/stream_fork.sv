// 1 -> 2 broadcast of one stream to two consumers, for a graph edge that
// feeds two nodes (the gradient pair goes to both Magnitude and Phase).
// Each branch has a "taken" flag: a branch that has accepted the current beat
// drops its valid and waits, and the source beat is released once both
// branches have it. A branch's valid, once raised, stays until it is taken,
// so each consumer sees a legal stream even when the other one stalls.
module stream_fork #(
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [DW-1:0] s_data,
  output logic          a_valid,
  input  logic          a_ready,
  output logic [DW-1:0] a_data,
  output logic          b_valid,
  input  logic          b_ready,
  output logic [DW-1:0] b_data
);
  logic a_done, b_done;

  assign a_valid = s_valid && !a_done;
  assign b_valid = s_valid && !b_done;
  assign s_ready = (a_ready || a_done) && (b_ready || b_done);
  assign a_data  = s_data;
  assign b_data  = s_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_done <= 1'b0;
      b_done <= 1'b0;
    end else if (s_valid && s_ready) begin
      a_done <= 1'b0;
      b_done <= 1'b0;
    end else begin
      if (a_valid && a_ready) a_done <= 1'b1;
      if (b_valid && b_ready) b_done <= 1'b1;
    end
  end
endmodule

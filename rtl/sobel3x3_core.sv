// One lane of the Sobel3x3 kernel.
//
// Takes a 3x3 window of U8 pixels (row-major, top-left in the low byte) and
// returns the OpenVX Sobel gradients as signed 16-bit values:
//   gx = [-1 0 1; -2 0 2; -1 0 1],  gy = [-1 -2 -1; 0 0 0; 1 2 1].
// Their range is -1020..1020. Output is {gy, gx}. Purely combinational.
module sobel3x3_core
  import ovx_pkg::*;
(
  input  logic [8:0][7:0] win,
  output grad_pair_t      grad
);
  always_comb begin
    grad.gx = (grad_t'(win[2]) + 2 * grad_t'(win[5]) + grad_t'(win[8]))
            - (grad_t'(win[0]) + 2 * grad_t'(win[3]) + grad_t'(win[6]));
    grad.gy = (grad_t'(win[6]) + 2 * grad_t'(win[7]) + grad_t'(win[8]))
            - (grad_t'(win[0]) + 2 * grad_t'(win[1]) + grad_t'(win[2]));
  end
endmodule

// Shared types and constants of the OpenVX Sobel accelerator.
//
// Every stream in the design carries whole pixels, W_T of them per beat at
// node boundaries. The kernel selector names the five OpenVX functions of the
// Sobel graph; in_pw()/out_pw() give the bits per pixel a kernel reads and
// writes, so a node's port widths follow from its kernel alone.
// Pixel formats follow OpenVX: gray and phase images are U8, gradients and
// magnitude are S16, and a gradient pair travels as {grady, gradx}.
package ovx_pkg;

  localparam int PIX_W  = 8;   // U8 pixel
  localparam int RGB_W  = 24;  // RGB888 pixel, R in the low byte
  localparam int GRAD_W = 16;  // S16 gradient or magnitude
  localparam int PAIR_W = 2 * GRAD_W;

  typedef enum logic [2:0] {
    K_COLOR_CONVERT = 3'd0,   // Pixel2Pixel, RGB888 -> U8
    K_MAGNITUDE     = 3'd1,   // Pixel2Pixel, {gy,gx} -> S16
    K_PHASE         = 3'd2,   // Pixel2Pixel, {gy,gx} -> U8
    K_GAUSSIAN3X3   = 3'd3,   // Window2Pixel, U8 -> U8
    K_SOBEL3X3      = 3'd4    // Window2Pixel, U8 -> {gy,gx}
  } kernel_e;

  typedef logic signed [GRAD_W-1:0] grad_t;

  typedef struct packed {
    grad_t gy;
    grad_t gx;
  } grad_pair_t;

  // Bits per pixel on a kernel's input channel.
  function automatic int in_pw(kernel_e k);
    case (k)
      K_COLOR_CONVERT: return RGB_W;
      K_MAGNITUDE, K_PHASE: return PAIR_W;
      default: return PIX_W;
    endcase
  endfunction

  // Bits per pixel on a kernel's output channel.
  function automatic int out_pw(kernel_e k);
    case (k)
      K_MAGNITUDE: return GRAD_W;
      K_SOBEL3X3:  return PAIR_W;
      default:     return PIX_W;
    endcase
  endfunction

endpackage

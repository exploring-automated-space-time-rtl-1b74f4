// One lane of the Gaussian3x3 kernel.
//
// Takes a 3x3 window of U8 pixels (row-major, top-left in the low byte) and
// returns sum(w*p)/16 with weights [1 2 1; 2 4 2; 1 2 1], truncated, as the
// OpenVX Gaussian3x3 defines. Purely combinational.
module gaussian3x3_core (
  input  logic [8:0][7:0] win,
  output logic [7:0]      pix
);
  logic [11:0] sum;
  always_comb begin
    sum = 12'(win[0]) + 12'(win[2]) + 12'(win[6]) + 12'(win[8])
        + ((12'(win[1]) + 12'(win[3]) + 12'(win[5]) + 12'(win[7])) << 1)
        + (12'(win[4]) << 2);
    pix = 8'(sum >> 4);
  end
endmodule

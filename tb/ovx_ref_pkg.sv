// Reference arithmetic for the testbenches, written independently of the
// RTL: OpenVX-style image functions on whole images held in int arrays.
package ovx_ref_pkg;
  localparam real PI = 3.14159265358979;

  function automatic int luma(int r, int g, int b);
    return (54 * r + 183 * g + 19 * b + 128) / 256;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Pixel of a W x H image with replicated border.
  function automatic int px(const ref int img[], input int w, input int h, input int r, input int c);
    return img[clampi(r, 0, h - 1) * w + clampi(c, 0, w - 1)];
  endfunction

  function automatic void gauss_img(const ref int src[], ref int dst[], input int w, input int h);
    dst = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int s;
        s = px(src, w, h, r-1, c-1) + 2*px(src, w, h, r-1, c) + px(src, w, h, r-1, c+1)
          + 2*px(src, w, h, r, c-1) + 4*px(src, w, h, r, c) + 2*px(src, w, h, r, c+1)
          + px(src, w, h, r+1, c-1) + 2*px(src, w, h, r+1, c) + px(src, w, h, r+1, c+1);
        dst[r * w + c] = s / 16;
      end
  endfunction

  function automatic void sobel_img(const ref int src[], ref int gx[], ref int gy[], input int w, input int h);
    gx = new[w * h];
    gy = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        gx[r*w+c] = (px(src, w, h, r-1, c+1) + 2*px(src, w, h, r, c+1) + px(src, w, h, r+1, c+1))
                  - (px(src, w, h, r-1, c-1) + 2*px(src, w, h, r, c-1) + px(src, w, h, r+1, c-1));
        gy[r*w+c] = (px(src, w, h, r+1, c-1) + 2*px(src, w, h, r+1, c) + px(src, w, h, r+1, c+1))
                  - (px(src, w, h, r-1, c-1) + 2*px(src, w, h, r-1, c) + px(src, w, h, r-1, c+1));
      end
  endfunction

  function automatic int magnitude(int x, int y);
    int e;
    e = int'($floor($sqrt(real'(x) * x + real'(y) * y) + 0.5));
    return (e > 32767) ? 32767 : e;
  endfunction

  function automatic int phase(int x, int y);
    real a;
    if (x == 0 && y == 0) return 0;
    a = $atan2(real'(y), real'(x));
    if (a < 0) a += 2.0 * PI;
    return int'($floor(a * 256.0 / (2.0 * PI) + 0.5)) % 256;
  endfunction

  // Circular distance of two 8-bit angles.
  function automatic int phase_dist(int a, int b);
    int d;
    d = (a - b + 512) % 256;
    return (d > 128) ? 256 - d : d;
  endfunction
endpackage

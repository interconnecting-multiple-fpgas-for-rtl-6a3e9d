// Reference arithmetic for the testbenches: a plain loop-nest model of the
// int8 3x3 convolution with requantization and ReLU, of 2x2 max pooling, and
// of the input quantization. Feature maps are HWC byte arrays, weights are
// stored [co][ky][kx][ci]. Rounding is computed as floor((acc*M0 + 2^(n-1)) /
// 2^n) with an explicit floor division, independent of shift operators.
package vgg_ref_pkg;

  typedef byte         bytes_t[];
  typedef int          ints_t[];

  function automatic longint floor_div(longint a, longint d);
    longint q = a / d;
    if ((a % d != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  function automatic byte requant(longint acc, longint m0, int sh, int zp, bit relu);
    longint v;
    if (sh == 0) v = acc * m0;
    else v = floor_div(acc * m0 + (longint'(1) << (sh - 1)), longint'(1) << sh);
    v = v + zp;
    if (relu && v < zp) v = zp;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return byte'(v);
  endfunction

  function automatic bytes_t conv(int w, int h, int cin, int cout, bytes_t x,
                                  bytes_t wt, ints_t bias, longint m0, int sh, int zp);
    bytes_t y = new[w * h * cout];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        for (int co = 0; co < cout; co++) begin
          longint acc = bias[co];
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++) begin
              int rr = r + ky - 1;
              int cc = c + kx - 1;
              if (rr >= 0 && rr < h && cc >= 0 && cc < w)
                for (int ci = 0; ci < cin; ci++)
                  acc += longint'(x[(rr * w + cc) * cin + ci]) *
                         longint'(wt[((co * 3 + ky) * 3 + kx) * cin + ci]);
            end
          y[(r * w + c) * cout + co] = requant(acc, m0, sh, zp, 1'b1);
        end
    return y;
  endfunction

  function automatic bytes_t pool(int w, int h, int ch, bytes_t x);
    bytes_t y = new[(w / 2) * (h / 2) * ch];
    for (int r = 0; r < h / 2; r++)
      for (int c = 0; c < w / 2; c++)
        for (int k = 0; k < ch; k++) begin
          byte m = -128;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              if (x[((2 * r + dy) * w + 2 * c + dx) * ch + k] > m)
                m = x[((2 * r + dy) * w + 2 * c + dx) * ch + k];
          y[(r * (w / 2) + c) * ch + k] = m;
        end
    return y;
  endfunction

endpackage

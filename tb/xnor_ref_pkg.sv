// xnor_ref_pkg: reference model of the binary CNN layers, used by the
// testbenches to compute expected results independently of the RTL.
// Maps are flat bit arrays indexed ((y * width) + x) * channels + c; conv
// weights are indexed f * (K*K*C) + (r*K + c)*C + ch; dense weights are
// indexed n * n_in + i. Bit 1 stands for +1 and bit 0 for -1.
package xnor_ref_pkg;
  // Binary convolution (stride 1, no padding), bias, 2x2 max pooling,
  // batch norm (x*mul + add) and sign. Returns the pooled output bits.
  function automatic void conv_layer(
      ref bit img[], input int w, input int h, input int c, input int k, input int f,
      ref bit wts[], ref int bias[], ref int mul[], ref int add[], ref bit out[]);
    int n, ow, oh, pw, ph;
    int s [];
    n  = k * k * c;
    ow = w - k + 1; oh = h - k + 1;
    pw = ow / 2;    ph = oh / 2;
    s   = new[ow * oh * f];
    out = new[pw * ph * f];
    for (int fi = 0; fi < f; fi++)
      for (int y = 0; y < oh; y++)
        for (int x = 0; x < ow; x++) begin
          int m;
          m = 0;
          for (int r = 0; r < k; r++)
            for (int cc = 0; cc < k; cc++)
              for (int ch = 0; ch < c; ch++)
                if (img[((y + r) * w + x + cc) * c + ch] == wts[fi * n + (r * k + cc) * c + ch]) m++;
          s[(y * ow + x) * f + fi] = 2 * m - n + bias[fi];
        end
    for (int fi = 0; fi < f; fi++)
      for (int py = 0; py < ph; py++)
        for (int px = 0; px < pw; px++) begin
          int mx, v;
          mx = -(1 << 30);
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++) begin
              v = s[((2 * py + dy) * ow + 2 * px + dx) * f + fi];
              if (v > mx) mx = v;
            end
          out[(py * pw + px) * f + fi] = (mx * mul[fi] + add[fi] >= 0);
        end
  endfunction

  // Binary fully connected layer with bias, batch norm and sign.
  function automatic void dense_layer(
      ref bit in_bits[], input int n_in, input int n_out, ref bit wts[],
      ref int bias[], ref int mul[], ref int add[], ref int val[], ref bit out[]);
    val = new[n_out];
    out = new[n_out];
    for (int o = 0; o < n_out; o++) begin
      int m;
      m = 0;
      for (int i = 0; i < n_in; i++) if (in_bits[i] == wts[o * n_in + i]) m++;
      val[o] = (2 * m - n_in + bias[o]) * mul[o] + add[o];
      out[o] = (val[o] >= 0);
    end
  endfunction
endpackage

// softsonic_ref_pkg - reference models for the SoftSONIC testbenches.
//
// Integer models of the engine kernels and of a whole Node applied to an
// image, written directly from the kernel definitions (plain int arithmetic,
// explicit edge clamping) rather than from the RTL's structure. Images are
// flat arrays indexed y*W + x. A 3x3 Node's output pixel (x, y) is the kernel
// applied to input pixels x-2..x of lines y-2..y, coordinates below zero
// clamped to zero. Also a random image generator.
package softsonic_ref_pkg;
  import softsonic_pkg::*;

  typedef pixel_t img_t [];

  function automatic int chv(pixel_t p, int ch);
    return (ch == 0) ? int'(p.r) : (ch == 1) ? int'(p.g) : int'(p.b);
  endfunction

  function automatic pixel_t mk(int r, int g, int b);
    pixel_t p;
    p.r = CH_W'(r); p.g = CH_W'(g); p.b = CH_W'(b);
    return p;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // win[row][col], rows y-2..y, cols x-2..x
  function automatic pixel_t ref_pixel(kernel_e k, pixel_t a, pixel_t b, pixel_t c,
                                       pixel_t win [3][3], int creg);
    int o [3];
    int wt [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    for (int ch = 0; ch < 3; ch++) begin
      int s, gx, gy, al;
      case (k)
        K_INVERT: o[ch] = 1023 - chv(a, ch);
        K_DIFF:   o[ch] = iabs(chv(a, ch) - chv(b, ch));
        K_ALPHA: begin
          al = (creg > 1024) ? 1024 : creg;
          o[ch] = (chv(a, ch) * al + chv(b, ch) * (1024 - al)) / 1024;
        end
        K_BLUR: begin
          s = 0;
          for (int r = 0; r < 3; r++)
            for (int q = 0; q < 3; q++) s += wt[r][q] * chv(win[r][q], ch);
          o[ch] = s / 16;
        end
        K_SOBEL: begin
          gx = chv(win[0][2], ch) + 2 * chv(win[1][2], ch) + chv(win[2][2], ch)
             - chv(win[0][0], ch) - 2 * chv(win[1][0], ch) - chv(win[2][0], ch);
          gy = chv(win[2][0], ch) + 2 * chv(win[2][1], ch) + chv(win[2][2], ch)
             - chv(win[0][0], ch) - 2 * chv(win[0][1], ch) - chv(win[0][2], ch);
          o[ch] = iabs(gx) + iabs(gy);
          if (o[ch] > 1023) o[ch] = 1023;
        end
        default: begin  // K_LENS
          int bs, cs, d;
          bs = int'(b.r) + int'(b.g) + int'(b.b);
          cs = int'(c.r) + int'(c.g) + int'(c.b);
          d  = (cs >= 1024) ? 2 : (cs >= 512) ? 1 : 0;
          o[ch] = (bs > creg) ? chv(win[2][2 - d], ch) : chv(a, ch);
        end
      endcase
    end
    return mk(o[0], o[1], o[2]);
  endfunction

  function automatic pixel_t pix_at(const ref pixel_t img [], input int w, input int y, input int x);
    if (y < 0) y = 0;
    if (x < 0) x = 0;
    return img[y * w + x];
  endfunction

  // A Node over a whole image of w x h (h lines of one frame).
  function automatic void ref_node(kernel_e k, bit window, int w, int h, int creg,
                                   const ref pixel_t a [], const ref pixel_t b [],
                                   const ref pixel_t c [], ref pixel_t o []);
    pixel_t win [3][3];
    o = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        for (int r = 0; r < 3; r++)
          for (int q = 0; q < 3; q++)
            win[r][q] = pix_at(a, w, window ? y - 2 + r : y, x - 2 + q);
        o[y * w + x] = ref_pixel(k, a[y * w + x], b[y * w + x], c[y * w + x], win, creg);
      end
  endfunction

  // Image of n pixels with independent random channel values.
  function automatic void rand_img(ref pixel_t o [], input int n);
    o = new[n];
    for (int i = 0; i < n; i++) o[i] = mk($urandom_range(1023), $urandom_range(1023), $urandom_range(1023));
  endfunction

endpackage

// tb_resize_ref_pkg: reference model shared by the testbenches.
//
// Computes, independently of the RTL, the test images, the scaled sizes and
// the expected resized pixels. Scaled pixel (i, j) of an image resized by
// factor f (fixed point, F fractional bits) is the bilinear interpolation at
// source position (f*j, f*i): x = FLOOR(f*j), y = FLOOR(f*i), fractional parts
// xd, yd, neighbours clamped to the last column/row, and
//   FLOOR(A(1-xd)(1-yd) + B xd(1-yd) + C yd(1-xd) + D xd yd).
package tb_resize_ref_pkg;

  // Test pattern: a pseudo-random but reproducible pixel for (seed, row, col).
  function automatic int unsigned src_pix(int unsigned seed, int unsigned r, int unsigned c);
    int unsigned h;
    h = seed * 32'h9E3779B1 ^ (r * 32'h85EBCA77) ^ (c * 32'hC2B2AE3D);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return h & 255;
  endfunction

  // round(x / f) for an integer size x
  function automatic int unsigned scaled_size(int unsigned x, longint unsigned f, int unsigned F);
    return int'(((longint'(x) << F) + (f >> 1)) / f);
  endfunction

  function automatic int unsigned ref_pix(int unsigned seed, int unsigned W, int unsigned H,
                                          longint unsigned f, int unsigned F,
                                          int unsigned i, int unsigned j);
    longint unsigned xp, yp, xd, yd, one, sum;
    int unsigned x, y, x1, y1, a, b, c, d;
    one = 64'd1 << F;
    xp = f * j;
    yp = f * i;
    x  = int'(xp >> F);
    y  = int'(yp >> F);
    xd = xp & (one - 1);
    yd = yp & (one - 1);
    x1 = (x + 1 < W) ? x + 1 : W - 1;
    y1 = (y + 1 < H) ? y + 1 : H - 1;
    a = src_pix(seed, y, x);   b = src_pix(seed, y, x1);
    c = src_pix(seed, y1, x);  d = src_pix(seed, y1, x1);
    sum = longint'(a) * (one - xd) * (one - yd) + longint'(b) * xd * (one - yd)
        + longint'(c) * yd * (one - xd) + longint'(d) * xd * yd;
    return int'(sum >> (2 * F));
  endfunction

  // Fixed-point factor for a real scale (rounded).
  function automatic longint unsigned to_fix(real s, int unsigned F);
    return longint'($rtoi(s * (2.0 ** F) + 0.5));
  endfunction

endpackage

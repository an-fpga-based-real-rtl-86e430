// tb_pkg: helpers shared by the testbenches.
//
// Conversions between IEEE 754 single-precision bit patterns and real
// numbers written from the format definition alone (not from the design's
// arithmetic), a distance in units in the last place, and a tolerance
// check. Reals are double precision, so they serve as reference values.
// All references here are computed independently of the RTL, in
// double precision from the textbook definitions; none of it is taken
// from the design description's implementation.
package tb_pkg;

  // bits -> real (denormals read as zero, like the design)
  function automatic real fp2real(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  // real -> bits, round to nearest even (from the double's bit pattern)
  function automatic logic [31:0] real2fp(input real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] frac;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return 32'h0;
    e = int'(d[62:52]) - 1023 + 127;
    frac = {1'b1, d[51:0]};
    m  = frac[52:29];
    g  = frac[28];
    st = |frac[27:0];
    mr = {1'b0, m} + 25'(g & (st | m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e++;
    end
    if (e <= 0)   return 32'h0;
    if (e >= 255) return {s, 8'hFE, 23'h7FFFFF};
    return {s, 8'(e), mr[22:0]};
  endfunction

  // distance in ulps between two patterns of the same sign
  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    if (a == b) return 0;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 1 << 30;
    return (a[30:0] > b[30:0]) ? int'(a[30:0] - b[30:0]) : int'(b[30:0] - a[30:0]);
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic bit close(input logic [31:0] f, input real ref_v, input real rel, input real abs_tol);
    return rabs(fp2real(f) - ref_v) <= rel * rabs(ref_v) + abs_tol;
  endfunction

  // a random float with the given exponent range, random sign
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  // ---- binary images (up to 32x32; row y, column x = bit x) ----
  typedef logic [31:0] image_t [32];

  // The two basic shapes of the evaluation (20x20): class I is a filled
  // rectangle, class II an L shape.
  function automatic image_t class1_image();
    image_t im;
    for (int y = 0; y < 32; y++) im[y] = '0;
    for (int y = 1; y <= 13; y++) for (int x = 2; x <= 17; x++) im[y][x] = 1'b1;
    return im;
  endfunction

  function automatic image_t class2_image();
    image_t im;
    for (int y = 0; y < 32; y++) im[y] = '0;
    for (int y = 2; y <= 11; y++) for (int x = 3; x <= 6; x++) im[y][x] = 1'b1;
    for (int y = 12; y <= 15; y++) for (int x = 3; x <= 17; x++) im[y][x] = 1'b1;
    return im;
  endfunction

  // move by (dx, dy), pixels leaving the w x h frame are lost
  function automatic image_t shift_image(input image_t im, input int w, input int h, input int dx, input int dy);
    image_t o;
    for (int y = 0; y < 32; y++) o[y] = '0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        if (x - dx >= 0 && x - dx < w && y - dy >= 0 && y - dy < h) o[y][x] = im[y - dy][x - dx];
    return o;
  endfunction

  // rotate a square n x n image by 90 degrees
  function automatic image_t rot90_image(input image_t im, input int n);
    image_t o;
    for (int y = 0; y < 32; y++) o[y] = '0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) o[x][n - 1 - y] = im[y][x];
    return o;
  endfunction

  function automatic image_t random_blob(input int w, input int h);
    image_t o;
    int x0, x1, y0, y1;
    for (int y = 0; y < 32; y++) o[y] = '0;
    for (int k = 0; k < 3; k++) begin
      x0 = $urandom_range(w - 1); x1 = $urandom_range(w - 1);
      y0 = $urandom_range(h - 1); y1 = $urandom_range(h - 1);
      for (int y = 0; y < h; y++) for (int x = 0; x < w; x++)
        if (((x >= x0 && x <= x1) || (x >= x1 && x <= x0)) && ((y >= y0 && y <= y1) || (y >= y1 && y <= y0)))
          o[y][x] = 1'b1;
    end
    // a few loose pixels
    for (int k = 0; k < 5; k++) o[$urandom_range(h - 1)][$urandom_range(w - 1)] = 1'b1;
    return o;
  endfunction

  // raw moments straight from the definition: index order
  // M00, M10, M01, M11, M20, M02, M21, M12, M30, M03
  function automatic void ref_raw(input image_t im, input int w, input int h, output longint m [10]);
    for (int i = 0; i < 10; i++) m[i] = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        if (im[y][x]) begin
          m[0] += 1;         m[1] += x;         m[2] += y;
          m[3] += x * y;     m[4] += x * x;     m[5] += y * y;
          m[6] += x * x * y; m[7] += x * y * y;
          m[8] += x * x * x; m[9] += y * y * y;
        end
  endfunction

  // central moments by direct summation about the centroid: order
  // mu00, mu11, mu20, mu02, mu21, mu12, mu30, mu03
  function automatic void ref_mu(input image_t im, input int w, input int h, output real mu [8]);
    real n, xm, ym, dx, dy;
    longint m [10];
    ref_raw(im, w, h, m);
    for (int i = 0; i < 8; i++) mu[i] = 0.0;
    n = real'(m[0]);
    if (m[0] == 0) return;
    xm = real'(m[1]) / n;
    ym = real'(m[2]) / n;
    mu[0] = n;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        if (im[y][x]) begin
          dx = real'(x) - xm;
          dy = real'(y) - ym;
          mu[1] += dx * dy;      mu[2] += dx * dx;      mu[3] += dy * dy;
          mu[4] += dx * dx * dy; mu[5] += dx * dy * dy;
          mu[6] += dx * dx * dx; mu[7] += dy * dy * dy;
        end
  endfunction

  // Hu invariants I1..I7 from eta = (e11, e20, e02, e21, e12, e30, e03)
  function automatic void ref_hu_from_eta(input real e [7], output real hu [7]);
    real e11, e20, e02, e21, e12, e30, e03, a, b, c, d;
    e11 = e[0]; e20 = e[1]; e02 = e[2]; e21 = e[3]; e12 = e[4]; e30 = e[5]; e03 = e[6];
    a = e30 + e12; b = e21 + e03; c = e30 - 3.0 * e12; d = 3.0 * e21 - e03;
    hu[0] = e20 + e02;
    hu[1] = (e20 - e02) ** 2 + 4.0 * e11 * e11;
    hu[2] = c * c + d * d;
    hu[3] = a * a + b * b;
    hu[4] = c * a * (a * a - 3.0 * b * b) + d * b * (3.0 * a * a - b * b);
    hu[5] = (e20 - e02) * (a * a - b * b) + 4.0 * e11 * a * b;
    hu[6] = d * a * (a * a - 3.0 * b * b) - c * b * (3.0 * a * a - b * b);
  endfunction

  // Hu invariants of an image, eta_pq = mu_pq / mu00^2
  function automatic void ref_hu(input image_t im, input int w, input int h, output real hu [7]);
    real mu [8];
    real e [7];
    ref_mu(im, w, h, mu);
    for (int i = 0; i < 7; i++) e[i] = (mu[0] == 0.0) ? 0.0 : mu[i + 1] / (mu[0] * mu[0]);
    ref_hu_from_eta(e, hu);
  endfunction

endpackage

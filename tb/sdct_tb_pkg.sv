// sdct_tb_pkg: reference models for the SDCT testbenches.
//
// Written independently of the RTL tables: the HEVC DCT matrix is rebuilt from
// the first column of the 32-point matrix (a list of 32 integers) with the sign
// of the real cosine; the lifting constants are recomputed from real tan/sin.
//  * ref_coef(N, k, n)   HEVC N-point matrix entry
//  * ref_dct2d(N, x, y)  HEVC forward 2D DCT of an N x N residual block
//                        (shifts log2N-1 and log2N+6 with rounding, 16-bit clip)
//  * ref_p / ref_u       Q8 lifting constants for angle index a (t = a*pi/16)
//  * ref_rot             integer lifting rotation, same rounding as the RTL
package sdct_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef int blk_t [32][32];

  function automatic int col0(input int i);
    int t [32] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                   64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4};
    return t[i];
  endfunction

  function automatic int ref_coef(input int n_pts, input int k, input int n);
    int kk, m, i;
    real c;
    kk = k * (32 / n_pts);
    if (kk == 0) return 64;
    m = (kk * (2 * n + 1)) % 128;
    i = m % 64;
    if (i > 32) i = 64 - i;
    if (i == 32) return 0;
    c = $cos(PI * m / 64.0);
    return (c > 0.0) ? col0(i) : -col0(i);
  endfunction

  function automatic int clip16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic void ref_dct2d(input int n_pts, input blk_t x, output blk_t y);
    blk_t z;
    int lg, s1, s2;
    longint acc;
    lg = $clog2(n_pts);
    s1 = lg - 1;
    s2 = lg + 6;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        z[r][c] = 0;
        y[r][c] = 0;
      end
    for (int r = 0; r < n_pts; r++)
      for (int k = 0; k < n_pts; k++) begin
        acc = 0;
        for (int n = 0; n < n_pts; n++) acc += longint'(ref_coef(n_pts, k, n)) * x[r][n];
        z[r][k] = clip16((acc + (64'sd1 << (s1 - 1))) >>> s1);
      end
    for (int v = 0; v < n_pts; v++)
      for (int u = 0; u < n_pts; u++) begin
        acc = 0;
        for (int r = 0; r < n_pts; r++) acc += longint'(ref_coef(n_pts, u, r)) * z[r][v];
        y[u][v] = clip16((acc + (64'sd1 << (s2 - 1))) >>> s2);
      end
  endfunction

  function automatic int ref_p(input int a);
    real t;
    t = a * PI / 16.0;
    return int'($floor(256.0 * $tan(t / 2.0) + 0.5));
  endfunction

  function automatic int ref_u(input int a);   // magnitude of U
    real t;
    t = a * PI / 16.0;
    return int'($floor(256.0 * $sin(t) + 0.5));
  endfunction

  function automatic void ref_rot(input int x1, input int x2, input int a,
                                  output int y1, output int y2);
    longint p, u, t;
    p  = ref_p(a);
    u  = ref_u(a);
    t  = x1 + ((p * x2) >>> 8);
    y2 = clip16(x2 + ((-(u * t)) >>> 8));
    y1 = clip16(t + ((p * y2) >>> 8));
  endfunction

endpackage

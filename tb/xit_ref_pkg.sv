// xit_ref_pkg: reference model of the HEVC 2-D inverse transform for the
// testbenches, written independently of the RTL datapath.
//
// Matrix entries come from the angle itself: the sign from cos((2n+1)k*pi/2N)
// computed in floating point, the magnitude from the HEVC quarter-period
// magnitude list indexed by the angle folded into [0, pi/2]. The 2-D result
// is the plain double loop of the standard (column pass, shift 7, clip to
// 16 bits, row pass, shift 20-bitDepth), on integers, with the final value
// also clipped to 16 bits.
package xit_ref_pkg;

  localparam int MAXB = 1024;          // samples in a 32x32 block
  typedef int blk_t [MAXB];            // raster order, index y*N + x

  localparam int MAG [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78,
                              75, 73, 70, 67, 64, 61, 57, 54, 50, 46, 43, 38,
                              36, 31, 25, 22, 18, 13, 9, 4, 0};

  localparam int DST [4][4] = '{'{29, 55, 74, 84}, '{74, 74, 0, -74},
                                '{84, -29, -74, 55}, '{55, -84, 74, -29}};

  function automatic int ref_coef(int k, int n, int log2n, bit dst);
    real pi, c, a;
    int  j;
    if (dst) return DST[k][n];
    if (k == 0) return 64;
    pi = 3.14159265358979;
    c  = $cos(pi * real'((2*n+1) * k) / real'(2 << log2n));
    a  = $acos(c < 0.0 ? -c : c);                 // 0 .. pi/2
    j  = int'(a * 64.0 / pi);                      // rounds to nearest
    return (c < 0.0) ? -MAG[j] : MAG[j];
  endfunction

  function automatic int clip16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // 2-D inverse transform of an N x N block, N = 2**log2n.
  function automatic blk_t ref_2d(blk_t c, int log2n, bit dst, int bit_depth);
    blk_t   g, r;
    int     n, s2;
    longint acc;
    n  = 1 << log2n;
    s2 = 20 - bit_depth;
    g  = '{default: 0};
    r  = '{default: 0};
    for (int x = 0; x < n; x++)
      for (int y = 0; y < n; y++) begin
        acc = 0;
        for (int k = 0; k < n; k++)
          acc += longint'(ref_coef(k, y, log2n, dst)) * c[k*n + x];
        g[y*n + x] = clip16((acc + 64) >>> 7);
      end
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        acc = 0;
        for (int k = 0; k < n; k++)
          acc += longint'(ref_coef(k, x, log2n, dst)) * g[y*n + k];
        r[y*n + x] = clip16((acc + (64'sd1 <<< (s2 - 1))) >>> s2);
      end
    return r;
  endfunction

  // Test blocks. 0: DC only (1024, known answer: every residual is 8),
  // 1: sparse small coefficients (typical after dequantisation),
  // 2: dense full-range coefficients (exercises the 16-bit clip),
  // 3: dense moderate coefficients.
  function automatic blk_t gen_block(int pattern, int log2n);
    blk_t c;
    int   n;
    n = 1 << log2n;
    c = '{default: 0};
    for (int i = 0; i < n*n; i++) begin
      unique case (pattern)
        0: c[i] = (i == 0) ? 1024 : 0;
        1: c[i] = (($urandom % 4) == 0) ? (int'($urandom % 513) - 256) : 0;
        2: c[i] = int'($urandom % 65536) - 32768;
        default: c[i] = int'($urandom % 4097) - 2048;
      endcase
    end
    return c;
  endfunction

endpackage

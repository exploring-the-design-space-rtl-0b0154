// xit_pkg: types, constants and coefficient functions shared by the HEVC
// inverse transform (xIT) blocks.
//
// The HEVC core transform matrices are integer approximations of scaled DCT
// basis functions with 8-bit entries. Every N-point matrix (N = 4..32) is a
// subset of the 32-point one: row k of the N-point matrix is row k*32/N of the
// 32-point matrix. Entry (k, n) of the 32-point matrix depends only on the
// phase index m = ((2n+1)*k) mod 128 of cos(m*pi/64), so the whole family is
// generated from the 33 magnitudes of one quarter period (COS_MAG below),
// which are the values the HEVC standard tabulates. The 4x4 DST used for
// intra luma residuals has its own 4x4 matrix.
//
// Size tokens carry log2(N)-2 and a DST flag. Data words are 16-bit signed,
// the width of the coefficients and of the transpose buffer.
package xit_pkg;

  localparam int COEF_W = 16;      // coefficients, intermediates and residuals
  localparam int MAT_W  = 8;       // transform matrix entries
  localparam int SHIFT1 = 7;       // first (column) stage right shift

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [MAT_W-1:0]  mat_t;

  // One Size token: which transform the next N*N coefficients need.
  typedef struct packed {
    logic       is_dst;    // 4x4 DST requested (honoured only when N = 4)
    logic [1:0] log2n_m2;  // log2(N) - 2 : 0 -> 4x4 ... 3 -> 32x32
  } xit_size_t;

  // Transform actors behind the splitter.
  typedef enum logic [1:0] {
    DEST_DST    = 2'd0,   // 4x4 inverse DST
    DEST_IT4_8  = 2'd1,   // merged 4x4 / 8x8 inverse DCT
    DEST_IT16_32 = 2'd2   // merged 16x16 / 32x32 inverse DCT
  } xit_dest_t;

  localparam int NUM_DEST = 3;

  // Routing rule of the splitter.
  function automatic xit_dest_t size_to_dest(input xit_size_t s);
    xit_dest_t d;
    if (s.log2n_m2 == 2'd0 && s.is_dst) d = DEST_DST;
    else if (s.log2n_m2 <= 2'd1)        d = DEST_IT4_8;
    else                                d = DEST_IT16_32;
    return d;
  endfunction

  // Magnitude of the 32-point matrix entry for phase index j = 0..32.
  // j = 0 only occurs on the DC row, whose entries are 64.
  localparam logic [6:0] COS_MAG [33] = '{
    7'd64, 7'd90, 7'd90, 7'd90, 7'd89, 7'd88, 7'd87, 7'd85, 7'd83, 7'd82, 7'd80,
    7'd78, 7'd75, 7'd73, 7'd70, 7'd67, 7'd64, 7'd61, 7'd57, 7'd54, 7'd50, 7'd46,
    7'd43, 7'd38, 7'd36, 7'd31, 7'd25, 7'd22, 7'd18, 7'd13, 7'd9,  7'd4,  7'd0};

  // Entry (k, n) of the N-point inverse DCT matrix, N = 2**log2n, so that
  // y[n] = sum_k dct_coef(k, n, log2n) * x[k].
  function automatic mat_t dct_coef(input logic [4:0] k, input logic [4:0] n,
                                    input logic [2:0] log2n);
    logic [4:0] ks;
    logic [6:0] m, mf;
    logic       neg;
    logic [5:0] j;
    mat_t       mag;
    ks  = k << (3'd5 - log2n);                          // row of the 32-point matrix
    m   = 7'({1'b0, n, 1'b1}) * 7'(ks);                 // phase mod 128 (period 2*pi)
    mf  = (m > 7'd64) ? 7'(8'd128 - {1'b0, m}) : m;     // cos(2*pi - a) = cos(a)
    neg = (mf > 7'd32);                                 // cos(pi - a) = -cos(a)
    j   = neg ? 6'(7'd64 - mf) : mf[5:0];
    mag = mat_t'({1'b0, COS_MAG[j]});
    return neg ? -mag : mag;
  endfunction

  // 4x4 inverse DST matrix, DST_MAT[k][n].
  localparam mat_t DST_MAT [4][4] = '{
    '{8'sd29,  8'sd55,  8'sd74,  8'sd84},
    '{8'sd74,  8'sd74,  8'sd0,  -8'sd74},
    '{8'sd84, -8'sd29, -8'sd74,  8'sd55},
    '{8'sd55, -8'sd84,  8'sd74, -8'sd29}};

  function automatic mat_t dst_coef(input logic [1:0] k, input logic [1:0] n);
    return DST_MAT[k][n];
  endfunction

  // Saturate to the 16-bit data range.
  function automatic coef_t sat16(input logic signed [31:0] v);
    coef_t r;
    if (v > 32'sd32767)       r = coef_t'(16'sh7fff);
    else if (v < -32'sd32768) r = coef_t'(16'sh8000);
    else                      r = coef_t'(v[15:0]);
    return r;
  endfunction

endpackage

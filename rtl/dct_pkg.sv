// Constants of the 8-point DCT/IDCT built with bit-serial distributed
// arithmetic.
//
// The orthonormal 8-point DCT matrix is C[k][n] = c(k)/2 * cos((2n+1)k*pi/16),
// c(0) = 1/sqrt(2), c(k>0) = 1. Every entry is +-cos(j*pi/16)/2 for some j
// (C[0][n] = cos(4*pi/16)/2), so the matrix is held as the eight values
// COS_K[j] = round(4096 * cos(j*pi/16)), j = 0..8, i.e. entries in units of
// 2^-13. coef(k, n) rebuilds any entry from them by the symmetries of the
// cosine. Samples are 16-bit two's complement inside the transform; the
// bit-serial accumulation runs over 17 bit slices (one guard bit for the
// butterfly).
package dct_pkg;

  localparam int unsigned SMP_W   = 16;  // internal sample width
  localparam int unsigned DA_BITS = 17;  // bit slices per transform
  localparam int unsigned ACC_W   = 34;  // accumulator width

  typedef logic signed [SMP_W-1:0] smp_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam int COS_K [9] = '{4096, 4017, 3784, 3406, 2896, 2276, 1567, 799, 0};

  // cos(j*pi/16) in units of 2^-12, any integer j >= 0
  function automatic int cos_k(int j);
    int r;
    r = j % 32;
    if (r > 16) r = 32 - r;
    return (r > 8) ? -COS_K[16 - r] : COS_K[r];
  endfunction

  // DCT matrix entry C[k][n] in units of 2^-13
  function automatic int coef(int k, int n);
    return (k == 0) ? COS_K[4] : cos_k((2 * n + 1) * k);
  endfunction

endpackage

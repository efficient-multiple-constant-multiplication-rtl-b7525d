// dct_pkg: constants of the HEVC forward DCT and the DSP groupings used by
// its multiple constant multipliers.
//
// HEVC's N-point DCT (N = 4, 8, 16, 32) uses integer approximations of
// 64*sqrt(2)*cos(j*pi/64). COEF_TAB[j] holds them for j = 1..31 (j = 0 is the
// flat first row, 64). Entry (r, k) of the N-point matrix is +/- one table
// value, selected by j = r*(2k+1)*32/N folded into 0..32 (coef()).
//
// The groupings say which constants share one DSP slice, separately for the
// column pass (inputs of 10, 11, 12 and 13 bits in the 16x16, 8x8, second
// 4x4 and first 4x4 datapaths) and for the row pass (17, 18, 19 and 20 bits).
// Narrow inputs leave room to pack two constants per slice; at 19 and 20 bits
// nothing pairs. The first 4x4 groupings (COL_G4, ROW_G4) are the ones the
// mapping algorithm finds, and dct4_datapath computes them itself; the
// others are the published pairings, which need the same number of slices
// as the algorithm's but pair the constants differently.
package dct_pkg;
  import mcm_pkg::*;

  // Input sample width of the column pass (8-bit video residuals) and the
  // width of intermediate and final coefficients.
  localparam int RES_W  = 9;
  localparam int COEF_W = 16;
  localparam int NMAX   = 32;
  localparam int BIT_DEPTH = 8;

  typedef int coef_tab_t [33];
  localparam coef_tab_t COEF_TAB = '{64,
    90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67, 64,
    61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4,  0};

  // Transform size code: 0 = 4x4, 1 = 8x8, 2 = 16x16, 3 = 32x32.
  typedef enum logic [1:0] {TU4 = 2'd0, TU8 = 2'd1, TU16 = 2'd2, TU32 = 2'd3} tu_size_e;

  // Matrix entry (r, k) of the n-point forward DCT.
  function automatic int coef(int n, int r, int k);
    int t;
    if (r == 0) return 64;
    t = (r * (2 * k + 1) * (32 / n)) % 128;
    if (t <= 32) return COEF_TAB[t];
    if (t <= 64) return -COEF_TAB[64 - t];
    if (t <= 96) return -COEF_TAB[t - 64];
    return COEF_TAB[128 - t];
  endfunction

  // Odd-part constants of the 2n-point DCT: the magnitudes of row 1 of its
  // n x n odd matrix, in column order.
  function automatic const_list_t odd_consts(int n);
    const_list_t l = '{default: 0};
    for (int k = 0; k < n; k++) l[k] = longint'(coef(2 * n, 1, k));
    return l;
  endfunction

  // Constants of the first 4x4 datapath (4-point DCT core).
  localparam const_list_t DCT4_CONSTS = '{0: 64, 1: 83, 2: 36, default: 0};

  // DSP groupings of the column pass.
  localparam group_tab_t COL_G4  = '{0: '{0: 36, 1: 83, default: 0}, default: '0};
  localparam group_tab_t COL_G44 = '{0: '{0: 18, 1: 75, default: 0}, 1: '{0: 50, 1: 89, default: 0}, default: '0};
  localparam group_tab_t COL_G8  = '{0: '{0: 9, 1: 87, default: 0}, 1: '{0: 80, 1: 70, default: 0}, 2: '{0: 25, 1: 43, default: 0}, 3: '{0: 57, 1: 90, default: 0}, default: '0};
  localparam group_tab_t COL_G16 = '{0: '{0: 13, 1: 67, default: 0}, 1: '{0: 22, 1: 85, default: 0}, 2: '{0: 82, 1: 78, default: 0}, 3: '{0: 31, 1: 90, default: 0}, 4: '{0: 38, 1: 73, default: 0}, 5: '{0: 46, 1: 61, default: 0}, 6: '{0: 54, default: 0}, default: '0};

  // DSP groupings of the row pass.
  localparam group_tab_t ROW_G4  = '{0: '{0: 36, default: 0}, 1: '{0: 83, default: 0}, default: '0};
  localparam group_tab_t ROW_G44 = '{0: '{0: 18, default: 0}, 1: '{0: 50, default: 0}, 2: '{0: 75, default: 0}, 3: '{0: 89, default: 0}, default: '0};
  localparam group_tab_t ROW_G8  = '{0: '{0: 25, 1: 90, default: 0}, 1: '{0: 80, 1: 43, default: 0}, 2: '{0: 9, 1: 70, default: 0}, 3: '{0: 57, default: 0}, 4: '{0: 87, default: 0}, default: '0};
  localparam group_tab_t ROW_G16 = '{0: '{0: 82, 1: 73, default: 0}, 1: '{0: 22, 1: 90, default: 0}, 2: '{0: 13, 1: 85, default: 0}, 3: '{0: 31, default: 0}, 4: '{0: 38, default: 0}, 5: '{0: 46, default: 0}, 6: '{0: 54, default: 0}, 7: '{0: 61, default: 0}, 8: '{0: 78, default: 0}, 9: '{0: 67, default: 0}, default: '0};

  // log2 of the transform size.
  function automatic int log2n(tu_size_e s);
    return 2 + int'(s);
  endfunction

endpackage

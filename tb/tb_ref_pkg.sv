// tb_ref_pkg: reference model of the HEVC forward DCT for the testbenches.
//
// The matrix is rebuilt here on its own path, not from the design's tables:
// the sign of entry (r, k) of the 32-point matrix comes from cos(pi*r*(2k+1)/64)
// in real arithmetic, its magnitude from the HEVC integer for the nearest angle
// j*pi/64, and the N-point matrix is the 32-point one with rows r*32/N. The
// 1D transform rounds, shifts and saturates to 16 bits like the design.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // HEVC integers for 64*sqrt(2)*cos(j*pi/64), j = 0..32 (j = 0: flat row).
  localparam int MAG [33] = '{64,
    90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67, 64,
    61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4,  0};

  function automatic int m32(int r, int k);
    real c;
    int  j;
    if (r == 0) return 64;
    c = $cos(PI * real'(r * (2 * k + 1)) / 64.0);
    j = int'($floor($acos(c < 0.0 ? -c : c) * 64.0 / PI + 0.5));
    return (c < 0.0) ? -MAG[j] : MAG[j];
  endfunction

  function automatic int mat(int n, int r, int k);
    return m32(r * (32 / n), k);
  endfunction

  function automatic int log2i(int n);
    int l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  // One n-point forward transform with the given right shift.
  function automatic void dct1(int n, int sh, input longint x[32], output longint y[32]);
    for (int r = 0; r < 32; r++) begin
      longint acc;
      acc = 0;
      if (r < n) begin
        for (int k = 0; k < n; k++) acc += longint'(mat(n, r, k)) * x[k];
        acc = (acc + (longint'(1) << (sh - 1))) >>> sh;
        if (acc > 32767) acc = 32767;
        if (acc < -32768) acc = -32768;
      end
      y[r] = acc;
    end
  endfunction

endpackage

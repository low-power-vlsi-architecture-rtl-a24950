// tb_hwt_ref_pkg: double-precision reference of the block transform.
// hilbert8: Hilbert transform of an 8-sample line padded with 8 zeros to the
// 16-point transform, xh(n) = (1/16) sum_m x(m) sum_{k=1..7} 2 sin(2 pi k (n-m)/16).
// dwt: 5/3 lifting, symmetric extension, rows then columns, Mallat layout.
// hwt_ref: the four combined components hR+, hR-, hI+, hI-.
// quant: round(|c| / Q) with halves away from zero, clipped to 127, signed.
package tb_hwt_ref_pkg;
  localparam int QTAB[64] = '{16,11,10,16,24,40,51,61, 12,12,14,19,26,58,60,55,
    14,13,16,24,40,57,69,56, 14,17,22,29,51,87,80,62, 18,22,37,56,68,109,103,77,
    24,35,55,64,81,104,113,92, 49,64,78,87,103,121,120,101, 72,92,95,98,112,100,103,99};
  localparam int ZZ[64] = '{0,1,8,16,9,2,3,10,17,24,32,25,18,11,4,5,12,19,26,33,40,48,
    41,34,27,20,13,6,7,14,21,28,35,42,49,56,57,50,43,36,29,22,15,23,30,37,44,51,58,59,
    52,45,38,31,39,46,53,60,61,54,47,55,62,63};

  typedef real blk_t[64];

  function automatic void hilbert8(input real x[8], output real y[8]);
    for (int n = 0; n < 8; n++) begin
      y[n] = 0.0;
      for (int m = 0; m < 8; m++)
        for (int k = 1; k < 8; k++)
          y[n] += x[m] * 2.0 * $sin(2.0 * 3.14159265358979 * real'(k * (n - m)) / 16.0);
      y[n] = y[n] / 16.0;
    end
  endfunction

  function automatic void lift(inout real x[8], input int s);
    real h[4], l[4], nx;
    for (int n = 0; n < s / 2; n++) begin
      nx = (2 * n + 2 < s) ? x[2*n+2] : x[s-2];
      h[n] = x[2*n+1] - 0.5 * (x[2*n] + nx);
    end
    for (int n = 0; n < s / 2; n++)
      l[n] = x[2*n] + 0.25 * ((n > 0 ? h[n-1] : h[0]) + h[n]);
    for (int n = 0; n < s / 2; n++) begin x[n] = l[n]; x[s/2+n] = h[n]; end
  endfunction

  function automatic void dwt(inout blk_t b, input int lv);
    real line[8];
    int s = 8;
    for (int k = 0; k < lv; k++) begin
      for (int r = 0; r < s; r++) begin
        for (int c = 0; c < s; c++) line[c] = b[r*8+c];
        lift(line, s);
        for (int c = 0; c < s; c++) b[r*8+c] = line[c];
      end
      for (int c = 0; c < s; c++) begin
        for (int r = 0; r < s; r++) line[r] = b[r*8+c];
        lift(line, s);
        for (int r = 0; r < s; r++) b[r*8+c] = line[r];
      end
      s = s / 2;
    end
  endfunction

  function automatic void hwt_ref(input blk_t f, input int lv, output real o[4][64]);
    blk_t hx, hy, hxy;
    real x[8], y[8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) x[c] = f[r*8+c];
      hilbert8(x, y);
      for (int c = 0; c < 8; c++) hx[r*8+c] = y[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) x[r] = f[r*8+c];
      hilbert8(x, y);
      for (int r = 0; r < 8; r++) hy[r*8+c] = y[r];
      for (int r = 0; r < 8; r++) x[r] = hx[r*8+c];
      hilbert8(x, y);
      for (int r = 0; r < 8; r++) hxy[r*8+c] = y[r];
    end
    dwt(f, lv); dwt(hx, lv); dwt(hy, lv); dwt(hxy, lv);
    for (int i = 0; i < 64; i++) begin
      o[0][i] = f[i] - hxy[i];
      o[1][i] = f[i] + hxy[i];
      o[2][i] = hx[i] + hy[i];
      o[3][i] = hx[i] - hy[i];
    end
  endfunction

  function automatic int quant(input real c, input int pos);
    real a = (c < 0) ? -c : c;
    int q = int'($floor(a / real'(QTAB[pos]) + 0.5));
    if (q > 127) q = 127;
    return (c < 0) ? -q : q;
  endfunction
endpackage

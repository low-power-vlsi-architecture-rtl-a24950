// hwt_pkg: types and constants shared by the image compressor.
// Numbers inside the transform datapath are IEEE-754 single precision
// (fp32_t); complex samples pair two of them. The constants are the 5/3
// lifting coefficients and the 16-point twiddle factors W16^k = cos - j sin.
package hwt_pkg;
  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  localparam fp32_t FP_ZERO     = 32'h0000_0000;
  localparam fp32_t FP_ONE      = 32'h3f80_0000;
  localparam fp32_t FP_M_HALF   = 32'hbf00_0000;  // -0.5  predict coefficient
  localparam fp32_t FP_QUARTER  = 32'h3e80_0000;  // 0.25  update coefficient
  localparam fp32_t FP_SQRT1_2  = 32'h3f35_04f3;  // cos(pi/4)

  // Negate: flip the sign bit (also the "2's complement of the imaginary part"
  // used for conjugation in a sign-magnitude format).
  function automatic fp32_t fneg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja
  function automatic cplx_t mul_mj(input cplx_t x);
    cplx_t y;
    y.re = x.im;
    y.im = fneg(x.re);
    return y;
  endfunction

  // Exact integer (0..2^24) to fp32 conversion for the unsigned pixel input.
  function automatic fp32_t u2f(input logic [23:0] v);
    logic [7:0] e;
    logic [23:0] m;
    int p;
    if (v == 0) return FP_ZERO;
    p = 0;
    for (int i = 0; i < 24; i++) if (v[i]) p = i;
    m = v << (23 - p);
    e = 8'(127 + p);
    return {1'b0, e, m[22:0]};
  endfunction

  // Divide by 2^k by lowering the exponent (flush to zero on underflow).
  function automatic fp32_t fscale_down(input fp32_t a, input int unsigned k);
    if (a[30:23] <= 8'(k)) return FP_ZERO;
    return {a[31], a[30:23] - 8'(k), a[22:0]};
  endfunction
endpackage

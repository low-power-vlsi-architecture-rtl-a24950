// tb_fp_pkg: reference conversions between single-precision bit patterns and
// the simulator's double-precision real type, written independently of the
// design's arithmetic. Used by the testbenches to work out expected values.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Round a real to the nearest single (ties to even); tiny values become 0.
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic [28:0] rest;
    logic        up;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:0] == 0 || e <= 0) return {d[63], 31'd0};
    m    = {1'b0, d[51:29]};
    rest = d[28:0];
    up   = rest[28] && ((rest[27:0] != 0) || m[0]);
    m    = m + 24'(up);
    if (m[23]) e++;
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Distance in units of the last place between two singles (same sign).
  function automatic int ulp_dist(input logic [31:0] x, input logic [31:0] y);
    int dx;
    if (x[30:0] == 0 && y[30:0] == 0) return 0;
    if (x[31] != y[31]) return 1 << 30;
    dx = int'(x[30:0]) - int'(y[30:0]);
    return dx < 0 ? -dx : dx;
  endfunction
endpackage

// fp_mul: IEEE-754 single-precision multiplier (combinational).
// Follows the usual steps: multiply the 24-bit significands (1.M1 * 1.M2),
// add the exponents and remove the bias, XOR the signs, normalise so the
// product has a leading 1, round to nearest even, and check for overflow
// (result saturates to infinity) and underflow (result flushes to signed
// zero). Subnormal inputs are treated as zero and NaN is not generated; these
// simplifications are this design's choice. No clock: callers register the
// result where their pipeline needs it.
module fp_mul
  import hwt_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);
  logic        s;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [9:0]  e;            // signed-extended exponent sum
  logic [23:0] mant;         // normalised significand before rounding
  logic        g, st, rnd;
  logic [24:0] mr;           // rounded significand with carry
  logic [9:0]  er;
  logic        a_zero, b_zero;

  always_comb begin
    s      = a[31] ^ b[31];
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    ma     = {1'b1, a[22:0]};
    mb     = {1'b1, b[22:0]};
    prod   = ma * mb;
    e      = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    if (prod[47]) begin
      mant = prod[47:24];
      g    = prod[23];
      st   = |prod[22:0];
      e    = e + 10'd1;
    end else begin
      mant = prod[46:23];
      g    = prod[22];
      st   = |prod[21:0];
    end
    rnd = g & (st | mant[0]);
    mr  = {1'b0, mant} + {24'd0, rnd};
    er  = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 10'd1;
    end
    if (a_zero || b_zero)            p = {s, 31'd0};
    else if (er[9] || er == 10'd0)   p = {s, 31'd0};              // underflow
    else if (er >= 10'd255)          p = {s, 8'hff, 23'd0};       // overflow
    else                             p = {s, er[7:0], mr[22:0]};
  end
endmodule

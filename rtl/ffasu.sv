// ffasu: fused floating-point add-subtract unit (IEEE-754 single, combinational).
// One exponent comparison and one alignment shifter serve both results: the
// operand with the smaller magnitude is shifted right by the exponent
// difference d (keeping guard, round and sticky bits), then the aligned
// significands are both added and subtracted. Each of A+B and A-B picks the
// magnitude add or subtract according to the operand signs, is normalised
// (leading-zero shift) and rounded to nearest even. Subnormals are treated as
// zero, overflow saturates to infinity, underflow flushes to zero; these are
// this design's choices. Outputs sum = a + b and diff = a - b.
module ffasu
  import hwt_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t sum,
  output fp32_t diff
);
  // Normalise a 28-bit magnitude (hidden bit at [26], GRS at [2:0]) and round.
  function automatic fp32_t pack(input logic sgn, input logic [8:0] exp_in,
                                 input logic [27:0] mag_in);
    logic [27:0] m;
    logic [9:0]  ex;
    logic        rnd;
    logic [24:0] mr;
    int          lz;
    m  = mag_in;
    ex = {1'b0, exp_in};
    if (m == 28'd0) return FP_ZERO;
    if (m[27]) begin
      m  = {1'b0, m[27:2], m[1] | m[0]};
      ex = ex + 10'd1;
    end else begin
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (m[i]) break;
        lz++;
      end
      m  = m << lz;
      ex = ex - 10'(lz);
    end
    rnd = m[2] & ((|m[1:0]) | m[3]);
    mr  = {1'b0, m[26:3]} + {24'd0, rnd};
    if (mr[24]) begin
      mr = mr >> 1;
      ex = ex + 10'd1;
    end
    if (ex[9] || ex == 10'd0) return {sgn, 31'd0};
    if (ex >= 10'd255)        return {sgn, 8'hff, 23'd0};
    return {sgn, ex[7:0], mr[22:0]};
  endfunction

  logic        a_big;
  fp32_t       op_b, op_s;
  logic [7:0]  d;
  logic [26:0] mbig, msml, msh;
  logic        sticky;
  logic [27:0] madd, msub;
  logic        sa, sb, sbig;

  always_comb begin
    sa    = a[31];
    sb    = b[31];
    a_big = (a[30:0] >= b[30:0]);            // magnitude compare (exp then mantissa)
    op_b   = a_big ? a : b;
    op_s = a_big ? b : a;
    sbig  = a_big ? sa : sb;                 // sign of the larger operand in A+B
    d     = op_b[30:23] - op_s[30:23];
    mbig  = (op_b[30:23]   == 8'd0) ? 27'd0 : {1'b1, op_b[22:0], 3'b000};
    msml  = (op_s[30:23] == 8'd0) ? 27'd0 : {1'b1, op_s[22:0], 3'b000};
    if (d >= 8'd27) begin
      msh    = 27'd0;
      sticky = |msml;
    end else begin
      msh    = msml >> d;
      sticky = |(msml & ~(27'h7ff_ffff << d));
    end
    msh[0] = msh[0] | sticky;
    madd   = {1'b0, mbig} + {1'b0, msh};
    msub   = {1'b0, mbig} - {1'b0, msh};
    // A + B
    if (sa == sb) sum = pack(sa, {1'b0, op_b[30:23]}, madd);
    else          sum = pack(sbig, {1'b0, op_b[30:23]}, msub);
    // A - B = A + (-B): the larger operand's sign flips when it is B
    if (sa != sb) diff = pack(sa, {1'b0, op_b[30:23]}, madd);
    else          diff = pack(a_big ? sa : ~sb, {1'b0, op_b[30:23]}, msub);
  end
endmodule

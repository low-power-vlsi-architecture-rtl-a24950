// dwt_processor: 5/3 lifting filter in single-precision floating point.
// Takes a triple (x(2n), x(2n+1), x(2n+2)) per clock (registers R1-R3) and
// computes
//   predict: h(2n+1) = x(2n+1) - 0.5 (x(2n) + x(2n+2))
//   update:  l(2n)   = x(2n)   + 0.25 (h(2n-1) + h(2n+1))
// R4 keeps the previous high-pass value h(2n-1). For the first triple of a
// line (in_first) it is replaced by h(2n+1) itself (symmetric extension). The
// coefficients -0.5 and 0.25 come from a two-entry ROM. Pipeline: seven
// register stages, one triple per clock; out_l/out_h are valid 7 clocks after
// the triple.
module dwt_processor
  import hwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  fp32_t in_e0,
  input  fp32_t in_o,
  input  fp32_t in_e1,
  output logic  out_valid,
  output fp32_t out_l,
  output fp32_t out_h
);
  localparam fp32_t COEF_ROM [2] = '{FP_M_HALF, FP_QUARTER};

  logic  v [7];
  logic  f [5];
  fp32_t r1, r2, r3, r4;
  fp32_t e0_b, o_b, e0_c, o_c, e0_d, e0_e, e0_f;
  fp32_t sum_b, p_c, h_d, h_e, h_f, t_e, q_f;
  fp32_t w_sum, w_p, w_h, w_t, w_q, w_l, u0, u1, u2, u3;

  ffasu  a_b (.a(r1),   .b(r3),  .sum(w_sum), .diff(u0));          // x(2n)+x(2n+2)
  fp_mul m_c (.a(sum_b), .b(COEF_ROM[0]), .p(w_p));                 // * -0.5
  ffasu  a_d (.a(o_c),  .b(p_c), .sum(w_h),   .diff(u1));          // predict
  ffasu  a_e (.a(f[3] ? h_d : r4), .b(h_d), .sum(w_t), .diff(u2)); // h(2n-1)+h(2n+1)
  fp_mul m_f (.a(t_e),  .b(COEF_ROM[1]), .p(w_q));                  // * 0.25
  ffasu  a_g (.a(e0_f), .b(q_f), .sum(w_l),   .diff(u3));          // update

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 7; i++) v[i] <= 1'b0;
      for (int i = 0; i < 5; i++) f[i] <= 1'b0;
      {r1, r2, r3, r4} <= '0;
      {e0_b, o_b, e0_c, o_c, e0_d, e0_e, e0_f} <= '0;
      {sum_b, p_c, h_d, h_e, h_f, t_e, q_f} <= '0;
      out_l <= FP_ZERO;
      out_h <= FP_ZERO;
    end else begin
      v[0] <= in_valid;
      for (int i = 1; i < 7; i++) v[i] <= v[i-1];
      f[0] <= in_first;
      for (int i = 1; i < 5; i++) f[i] <= f[i-1];
      // stage 1: input registers R1..R3
      if (in_valid) begin r1 <= in_e0; r2 <= in_o; r3 <= in_e1; end
      // stage 2: even sum
      if (v[0]) begin sum_b <= w_sum; e0_b <= r1; o_b <= r2; end
      // stage 3: scale by -0.5
      if (v[1]) begin p_c <= w_p; e0_c <= e0_b; o_c <= o_b; end
      // stage 4: predict, high-pass result
      if (v[2]) begin h_d <= w_h; e0_d <= e0_c; end
      // stage 5: neighbouring high-pass sum; R4 keeps this h for the next triple
      if (v[3]) begin t_e <= w_t; h_e <= h_d; e0_e <= e0_d; r4 <= h_d; end
      // stage 6: scale by 0.25
      if (v[4]) begin q_f <= w_q; e0_f <= e0_e; h_f <= h_e; end
      // stage 7: update, low-pass result
      if (v[5]) begin out_l <= w_l; out_h <= h_f; end
    end
  end
  assign out_valid = v[6];
endmodule

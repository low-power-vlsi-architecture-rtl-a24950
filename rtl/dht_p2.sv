// dht_p2: P2 element of the Hilbert transform processor: a P0 butterfly with
// span L = 4 followed by M1, which multiplies difference output k by
// W16^(2k), i.e. by 1, W^(N/8), -j or W^(3N/8) (Table 1 of the twiddle
// selection: S0 = k[0] selects W^(N/8), S1 = k[1] selects -j).
// W^(N/8) = c(1 - j) with c = cos(pi/4), so (a + jb)W^(N/8) = c(a+b) + jc(b-a):
// one fused add-subtract unit and two real multipliers. W^(3N/8) is formed as
// -j * W^(N/8) by the cascade, so no second complex multiplier is needed.
// Latency: L samples plus two clocks.
module dht_p2
  import hwt_pkg::*;
#(
  parameter int unsigned OFS = 0   // group phase at reset (see dht_p0)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_live,
  input  cplx_t in_data,
  output logic  out_valid,
  output logic  out_live,
  output cplx_t out_data
);
  logic       b_valid, b_live, b_diff;
  cplx_t      b_data;
  logic [2:0] b_k;
  logic       s0, s1;
  fp32_t      apb, bma, pr, pi;
  cplx_t      w8, m1;

  dht_p0 #(.L(4), .OFS(OFS)) u_p0 (
    .clk, .rst_n, .in_valid, .in_live, .in_data,
    .out_valid(b_valid), .out_live(b_live), .out_data(b_data),
    .out_diff(b_diff), .out_k(b_k)
  );

  assign s0 = b_diff && b_k[0];
  assign s1 = b_diff && b_k[1];

  ffasu  u_as (.a(b_data.im), .b(b_data.re), .sum(apb), .diff(bma));
  fp_mul u_mr (.a(apb), .b(FP_SQRT1_2), .p(pr));
  fp_mul u_mi (.a(bma), .b(FP_SQRT1_2), .p(pi));

  always_comb begin
    w8.re = pr;
    w8.im = pi;
    m1    = s0 ? w8 : b_data;
    if (s1) m1 = mul_mj(m1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_live  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= b_valid;
      if (b_valid) begin
        out_live <= b_live;
        out_data <= m1;
      end
    end
  end
endmodule

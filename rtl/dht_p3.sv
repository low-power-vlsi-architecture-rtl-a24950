// dht_p3: P3 element of the Hilbert transform processor: a full DIF butterfly
// with span L = 8 followed by M2, a general complex multiplier (four real
// multipliers and two adders) that multiplies difference output k by the
// twiddle factor W16^k = cos(2 pi k/16) - j sin(2 pi k/16) read from a ROM.
// Sum outputs bypass the multiplier. Latency: L samples plus two clocks.
module dht_p3
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
  logic [3:0] b_k;
  cplx_t      w;
  fp32_t      ar_wr, ai_wi, ar_wi, ai_wr, unused_s, unused_d;
  cplx_t      m2;

  dht_p0 #(.L(8), .OFS(OFS)) u_p0 (
    .clk, .rst_n, .in_valid, .in_live, .in_data,
    .out_valid(b_valid), .out_live(b_live), .out_data(b_data),
    .out_diff(b_diff), .out_k(b_k)
  );

  // Twiddle ROM: W16^k for k = 0..7 (real part, imaginary part).
  always_comb begin
    unique case (b_k[2:0])
      3'd0: w = '{re: 32'h3f80_0000, im: 32'h0000_0000};
      3'd1: w = '{re: 32'h3f6c_835e, im: 32'hbec3_ef15};
      3'd2: w = '{re: 32'h3f35_04f3, im: 32'hbf35_04f3};
      3'd3: w = '{re: 32'h3ec3_ef15, im: 32'hbf6c_835e};
      3'd4: w = '{re: 32'h0000_0000, im: 32'hbf80_0000};
      3'd5: w = '{re: 32'hbec3_ef15, im: 32'hbf6c_835e};
      3'd6: w = '{re: 32'hbf35_04f3, im: 32'hbf35_04f3};
      default: w = '{re: 32'hbf6c_835e, im: 32'hbec3_ef15};
    endcase
  end

  fp_mul u_m0 (.a(b_data.re), .b(w.re), .p(ar_wr));
  fp_mul u_m1 (.a(b_data.im), .b(w.im), .p(ai_wi));
  fp_mul u_m2 (.a(b_data.re), .b(w.im), .p(ar_wi));
  fp_mul u_m3 (.a(b_data.im), .b(w.re), .p(ai_wr));
  // real = ar*wr - ai*wi ; imag = ar*wi + ai*wr (one fused unit each)
  ffasu u_a0 (.a(ar_wr), .b(ai_wi), .sum(unused_s), .diff(m2.re));
  ffasu u_a1 (.a(ar_wi), .b(ai_wr), .sum(m2.im), .diff(unused_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_live  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= b_valid;
      if (b_valid) begin
        out_live <= b_live;
        out_data <= b_diff ? m2 : b_data;
      end
    end
  end
endmodule

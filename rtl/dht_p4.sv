// dht_p4: P4 element of the Hilbert transform processor. It has no adders or
// multipliers. It counts the 16 samples of a frame (frequency index k, in
// natural order). With HILBERT = 1 it applies the Hilbert filter -j sgn(k):
// -j for k = 1..7, +j for k = 9..15 and 0 for k = 0 and k = 8. In both modes
// it then swaps the real and imaginary parts (S0), so that a forward FFT can
// compute the inverse FFT. Multiplying by -j (S1) is itself a swap with one
// sign change, so no arithmetic is needed. Latency: one clock.
module dht_p4
  import hwt_pkg::*;
#(
  parameter bit          HILBERT = 1'b1,
  parameter int unsigned OFS     = 0     // frequency index at reset
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
  logic [3:0] k;
  cplx_t      y, sw;

  always_comb begin
    y = in_data;
    if (HILBERT) begin
      if (k == 4'd0 || k == 4'd8) y = '0;
      else if (k < 4'd8)          y = mul_mj(in_data);               // -j
      else                        y = '{re: fneg(in_data.im), im: in_data.re}; // +j
    end
    sw.re = y.im;
    sw.im = y.re;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= 4'(OFS);
      out_valid <= 1'b0;
      out_live  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        k        <= k + 1'b1;
        out_live <= in_live;
        out_data <= sw;
      end
    end
  end
endmodule

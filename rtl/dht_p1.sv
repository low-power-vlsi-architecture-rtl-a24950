// dht_p1: P1 element of the Hilbert transform processor: a P0 butterfly with
// span L = 2 followed by M0, which multiplies difference output k = 1 by -j
// (twiddle W4^1). Multiplication by -j needs no arithmetic: real and
// imaginary parts swap and the new imaginary part changes sign. Select signal
// S0 (here: difference output with k = 1) chooses the rotated or the plain
// sample. Latency: L samples plus two clocks.
module dht_p1
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
  logic [1:0] b_k;
  logic       s0;

  dht_p0 #(.L(2), .OFS(OFS)) u_p0 (
    .clk, .rst_n, .in_valid, .in_live, .in_data,
    .out_valid(b_valid), .out_live(b_live), .out_data(b_data),
    .out_diff(b_diff), .out_k(b_k)
  );

  assign s0 = b_diff && (b_k == 2'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_live  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= b_valid;
      if (b_valid) begin
        out_live <= b_live;
        out_data <= s0 ? mul_mj(b_data) : b_data;
      end
    end
  end
endmodule

// dht16: 16-point discrete Hilbert transform processor,
//   xh = IFFT( -j sgn(k) * FFT(x) ).
// Streaming, one real sample per clock when in_valid is high. The forward FFT
// is a radix-2 single-delay-feedback DIF pipeline of P3 (span 8), P2 (span 4),
// P1 (span 2) and P0 (span 1). A bit-reversal buffer restores natural
// frequency order. P4 applies -j sgn(k) and swaps real and imaginary parts,
// so the same forward FFT structure computes the inverse transform. After
// reordering, a final swap gives the result, whose real part is divided by 16
// with an exponent shift instead of a divider.
// Frames are 16 consecutive valid samples starting at the first valid after
// reset. Data move only on valid samples, so a frame is pushed out by further
// samples; in_live = 0 marks these flushing samples. out_live marks real
// results. Latency: 62 samples plus 18 clocks (80 clocks when samples arrive
// every clock).
module dht16
  import hwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_live,
  input  fp32_t in_x,
  output logic  out_valid,
  output logic  out_live,
  output fp32_t out_y
);
  localparam int NS = 11;
  // Every element counts its own samples, so each is started at the phase
  // that the delay in front of it (in samples) implies: 15 for the first FFT,
  // 16 for a reorder buffer.
  localparam int unsigned D_R0 = 15, D_H = 31, D_I3 = 31, D_I2 = 39, D_I1 = 43,
                          D_I0 = 45, D_R1 = 46;
  logic  v [NS+1];
  logic  lv[NS+1];
  cplx_t d [NS+1];

  assign v[0]  = in_valid;
  assign lv[0] = in_live;
  assign d[0]  = '{re: in_x, im: FP_ZERO};

  // forward FFT
  dht_p3 u_f3 (.clk, .rst_n, .in_valid(v[0]), .in_live(lv[0]), .in_data(d[0]),
               .out_valid(v[1]), .out_live(lv[1]), .out_data(d[1]));
  dht_p2 u_f2 (.clk, .rst_n, .in_valid(v[1]), .in_live(lv[1]), .in_data(d[1]),
               .out_valid(v[2]), .out_live(lv[2]), .out_data(d[2]));
  dht_p1 u_f1 (.clk, .rst_n, .in_valid(v[2]), .in_live(lv[2]), .in_data(d[2]),
               .out_valid(v[3]), .out_live(lv[3]), .out_data(d[3]));
  logic       unused_f0_diff;
  logic [0:0] unused_f0_k;
  dht_p0 #(.L(1)) u_f0 (.clk, .rst_n, .in_valid(v[3]), .in_live(lv[3]), .in_data(d[3]),
               .out_valid(v[4]), .out_live(lv[4]), .out_data(d[4]),
               .out_diff(unused_f0_diff), .out_k(unused_f0_k));
  bitrev_buffer #(.OFS((16 - D_R0 % 16) % 16)) u_r0 (.clk, .rst_n, .in_valid(v[4]), .in_live(lv[4]), .in_data(d[4]),
               .out_valid(v[5]), .out_live(lv[5]), .out_data(d[5]));
  // Hilbert filter and swap for the inverse transform
  dht_p4 #(.HILBERT(1'b1), .OFS((16 - D_H % 16) % 16)) u_h (.clk, .rst_n, .in_valid(v[5]), .in_live(lv[5]), .in_data(d[5]),
               .out_valid(v[6]), .out_live(lv[6]), .out_data(d[6]));
  // inverse FFT (forward structure on swapped data)
  dht_p3 #(.OFS((16 - D_I3 % 16) % 16)) u_i3 (.clk, .rst_n, .in_valid(v[6]), .in_live(lv[6]), .in_data(d[6]),
               .out_valid(v[7]), .out_live(lv[7]), .out_data(d[7]));
  dht_p2 #(.OFS((8 - D_I2 % 8) % 8)) u_i2 (.clk, .rst_n, .in_valid(v[7]), .in_live(lv[7]), .in_data(d[7]),
               .out_valid(v[8]), .out_live(lv[8]), .out_data(d[8]));
  dht_p1 #(.OFS((4 - D_I1 % 4) % 4)) u_i1 (.clk, .rst_n, .in_valid(v[8]), .in_live(lv[8]), .in_data(d[8]),
               .out_valid(v[9]), .out_live(lv[9]), .out_data(d[9]));
  logic       unused_i0_diff;
  logic [0:0] unused_i0_k;
  dht_p0 #(.L(1), .OFS((2 - D_I0 % 2) % 2)) u_i0 (.clk, .rst_n, .in_valid(v[9]), .in_live(lv[9]), .in_data(d[9]),
               .out_valid(v[10]), .out_live(lv[10]), .out_data(d[10]),
               .out_diff(unused_i0_diff), .out_k(unused_i0_k));
  bitrev_buffer #(.OFS((16 - D_R1 % 16) % 16)) u_r1 (.clk, .rst_n, .in_valid(v[10]), .in_live(lv[10]), .in_data(d[10]),
               .out_valid(v[11]), .out_live(lv[11]), .out_data(d[11]));

  // swap back: the real part of the inverse FFT is the imaginary part here
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_live  <= 1'b0;
      out_y     <= FP_ZERO;
    end else begin
      out_valid <= v[NS];
      if (v[NS]) begin
        out_live <= lv[NS];
        out_y    <= fscale_down(d[NS].im, 4);
      end
    end
  end
endmodule

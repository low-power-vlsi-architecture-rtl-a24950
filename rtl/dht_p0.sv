// dht_p0: radix-2 decimation-in-frequency butterfly with a single-delay
// feedback line (the P0 element of the Hilbert transform processor).
// The first L samples of every 2L-sample group are stored in the delay line
// (DL). While the next L samples arrive, the FFASUs form x[n]+x[n+L], which
// leaves the stage at once, and x[n]-x[n+L], which goes back into the DL and
// leaves during the first half of the following group. The two parallel
// results thus become one serial stream. The stage only moves when in_valid is
// high, so the last group is pushed out by further (non-live) samples.
// Each sample has a "live" tag: real data or a flushing sample.
// Output: one registered sample per input sample. out_diff marks a difference
// output, and out_k is its index within the group, which selects the twiddle
// factor in P1-P3. OFS sets the group phase at reset so that groups line up
// with frames when the stage sits behind earlier delays.
// Latency: L samples plus one clock.
module dht_p0
  import hwt_pkg::*;
#(
  parameter int unsigned L   = 1,
  parameter int unsigned OFS = 0   // sample count at reset, aligns groups to frames
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_live,
  input  cplx_t                    in_data,
  output logic                     out_valid,
  output logic                     out_live,
  output cplx_t                    out_data,
  output logic                     out_diff,
  output logic [$clog2(2*L)-1:0]   out_k
);
  localparam int unsigned CW = $clog2(2 * L);

  cplx_t   dl      [L];
  logic    dl_live [L];
  logic [CW-1:0] cnt;
  logic    phase;
  cplx_t   s, d;
  cplx_t   head;

  assign head  = dl[L-1];
  assign phase = (cnt >= CW'(L));

  ffasu u_re (.a(head.re), .b(in_data.re), .sum(s.re), .diff(d.re));
  ffasu u_im (.a(head.im), .b(in_data.im), .sum(s.im), .diff(d.im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= CW'(OFS);
      out_valid <= 1'b0;
      out_live  <= 1'b0;
      out_data  <= '0;
      out_diff  <= 1'b0;
      out_k     <= '0;
      for (int i = 0; i < int'(L); i++) begin
        dl[i]      <= '0;
        dl_live[i] <= 1'b0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cnt <= (cnt == CW'(2 * L - 1)) ? '0 : cnt + 1'b1;
        for (int i = 1; i < int'(L); i++) begin
          dl[i]      <= dl[i-1];
          dl_live[i] <= dl_live[i-1];
        end
        dl_live[0] <= in_live;
        if (!phase) begin
          // first half: emit the stored differences, store the new sample
          out_data <= head;
          out_live <= dl_live[L-1];
          out_diff <= 1'b1;
          out_k    <= cnt;
          dl[0]    <= in_data;
        end else begin
          // second half: emit the sum, store the difference
          out_data <= s;
          out_live <= in_live;
          out_diff <= 1'b0;
          out_k    <= cnt - CW'(L);
          dl[0]    <= d;
        end
      end
    end
  end
endmodule

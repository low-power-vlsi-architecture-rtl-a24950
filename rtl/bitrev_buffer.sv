// bitrev_buffer: ping-pong reorder buffer that turns the bit-reversed output
// order of the decimation-in-frequency FFT into natural order. Sample i of a
// 16-sample frame is written to address bitrev(i) of one bank while the other
// bank, holding the previous frame, is read out in natural order. The banks
// swap after every frame. It moves only on in_valid, like the butterfly
// stages, and carries the live tag. Latency: one frame (16 samples) plus one
// clock.
module bitrev_buffer
  import hwt_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned OFS = 0     // sample index at reset, aligns to frames
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
  localparam int unsigned AW = $clog2(N);

  cplx_t          mem      [2][N];
  logic           mem_live [2][N];
  logic [AW-1:0]  idx, ridx;
  logic           bank;

  always_comb
    for (int b = 0; b < int'(AW); b++) ridx[b] = idx[AW-1-b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= AW'(OFS);
      bank      <= 1'b0;
      out_valid <= 1'b0;
      out_live  <= 1'b0;
      out_data  <= '0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < int'(N); i++) begin
          mem[b][i]      <= '0;
          mem_live[b][i] <= 1'b0;
        end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mem[bank][ridx]      <= in_data;
        mem_live[bank][ridx] <= in_live;
        out_data             <= mem[~bank][idx];
        out_live             <= mem_live[~bank][idx];
        idx                  <= idx + 1'b1;
        if (idx == AW'(N - 1)) bank <= ~bank;
      end
    end
  end
endmodule

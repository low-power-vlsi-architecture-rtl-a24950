// dwt_mem_unit1: memory unit 1 of the 2-D DWT, the "split" stage of the
// lifting scheme. A 64-word dual-port RAM holds an 8x8 block of fp32 samples.
// Port A writes (block load and level-to-level transfer) and reads the even
// sample x(2n) of a pair; port B reads the odd sample x(2n+1). Registers R1
// and R2 keep the previous pair, so once the next pair is read the unit hands
// the processor a triple (x(2n), x(2n+1), x(2n+2)) per clock. At the end of a
// line the controller issues a "mirror" request. It repeats the last even
// sample as x(2n+2) (symmetric extension), which needs no memory read.
// Timing: a request in clock t yields its triple (if any) at the output
// registers in clock t+2.
module dwt_mem_unit1
  import hwt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // port A write
  input  logic       wr_en,
  input  logic [5:0] wr_addr,
  input  fp32_t      wr_data,
  // pair read request
  input  logic       rd_en,
  input  logic       rd_mirror,   // no read: emit (R1, R2, R1)
  input  logic       rd_emit,     // a triple is complete with this request
  input  logic       rd_first,    // that triple starts a line
  input  logic [5:0] rd_addr_e,
  input  logic [5:0] rd_addr_o,
  // triple to the DWT processor
  output logic       out_valid,
  output logic       out_first,
  output fp32_t      out_e0,
  output fp32_t      out_o,
  output fp32_t      out_e1
);
  fp32_t ram [64];
  fp32_t q_e, q_o;
  fp32_t r1, r2;
  logic  p_v, p_mirror, p_emit, p_first;

  // dual-port RAM, synchronous read
  always_ff @(posedge clk) begin
    if (wr_en) ram[wr_addr] <= wr_data;
    q_e <= ram[rd_addr_e];
    q_o <= ram[rd_addr_o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_v <= 1'b0; p_mirror <= 1'b0; p_emit <= 1'b0; p_first <= 1'b0;
      r1 <= FP_ZERO; r2 <= FP_ZERO;
      out_valid <= 1'b0; out_first <= 1'b0;
      out_e0 <= FP_ZERO; out_o <= FP_ZERO; out_e1 <= FP_ZERO;
    end else begin
      p_v      <= rd_en;
      p_mirror <= rd_mirror;
      p_emit   <= rd_emit;
      p_first  <= rd_first;
      out_valid <= p_v && (p_emit || p_mirror);
      if (p_v) begin
        out_first <= p_first;
        out_e0    <= r1;
        out_o     <= r2;
        if (p_mirror) begin
          out_e1 <= r1;
        end else begin
          out_e1 <= q_e;
          r1     <= q_e;
          r2     <= q_o;
        end
      end
    end
  end
endmodule

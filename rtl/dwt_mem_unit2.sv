// dwt_mem_unit2: memory unit 2 of the 2-D DWT. A 64-word RAM with two write
// inputs, so that the low-pass and high-pass results of one lifting step are
// stored in the same clock, and one synchronous read output. The read output
// feeds the approximation (LL) coefficients back for the next pass or level,
// and delivers the finished sub-bands. Read data appear one clock after the
// address.
module dwt_mem_unit2
  import hwt_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [5:0] addr_l,
  input  fp32_t      data_l,
  input  logic [5:0] addr_h,
  input  fp32_t      data_h,
  input  logic [5:0] rd_addr,
  output fp32_t      rd_data
);
  fp32_t ram [64];
  always_ff @(posedge clk) begin
    if (we) begin
      ram[addr_l] <= data_l;
      ram[addr_h] <= data_h;
    end
    rd_data <= ram[rd_addr];
  end
endmodule

// dwt2d: two-dimensional 5/3 lifting DWT of one 8x8 block in single-precision
// floating point, made of memory unit 1, the DWT processor, memory unit 2 and
// the control unit. Usage: write the 64 samples (row-major) through the load
// port while the unit is idle, pulse start with the number of levels (1..3),
// wait for done, then read the coefficients through rd_addr/rd_data (one
// clock read latency). Layout of the result: standard Mallat layout. After
// level 1, LL is in rows 0-3 / cols 0-3, HL in cols 4-7 of rows 0-3, LH in
// rows 4-7 of cols 0-3, HH in the rest. Each further level splits the LL
// quadrant the same way.
// Time per level on an S x S region: about S*(S/2+1) clocks per pass, two
// passes, plus S*S transfer clocks and the pipeline drain.
module dwt2d
  import hwt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_en,
  input  logic [5:0] ld_addr,
  input  fp32_t      ld_data,
  input  logic       start,
  input  logic [1:0] level,
  output logic       busy,
  output logic       done,
  input  logic [5:0] rd_addr,
  output fp32_t      rd_data
);
  logic       m1_rd_en, m1_rd_mirror, m1_rd_emit, m1_rd_first;
  logic [5:0] m1_addr_e, m1_addr_o;
  logic       xfer_rd, xfer_wr_en;
  logic [5:0] xfer_rd_addr, xfer_wr_addr;
  logic       m2_we;
  logic [5:0] m2_addr_l, m2_addr_h;
  logic       t_valid, t_first, p_valid;
  fp32_t      t_e0, t_o, t_e1, p_l, p_h;

  dwt_control u_ctl (
    .clk, .rst_n, .start, .level, .busy, .done,
    .m1_rd_en, .m1_rd_mirror, .m1_rd_emit, .m1_rd_first, .m1_addr_e, .m1_addr_o,
    .xfer_rd, .xfer_rd_addr, .xfer_wr_en, .xfer_wr_addr,
    .proc_valid(p_valid), .m2_we, .m2_addr_l, .m2_addr_h
  );

  dwt_mem_unit1 u_m1 (
    .clk, .rst_n,
    .wr_en(xfer_wr_en || (ld_en && !busy)),
    .wr_addr(xfer_wr_en ? xfer_wr_addr : ld_addr),
    .wr_data(xfer_wr_en ? rd_data : ld_data),
    .rd_en(m1_rd_en), .rd_mirror(m1_rd_mirror), .rd_emit(m1_rd_emit), .rd_first(m1_rd_first),
    .rd_addr_e(m1_addr_e), .rd_addr_o(m1_addr_o),
    .out_valid(t_valid), .out_first(t_first), .out_e0(t_e0), .out_o(t_o), .out_e1(t_e1)
  );

  dwt_processor u_proc (
    .clk, .rst_n, .in_valid(t_valid), .in_first(t_first),
    .in_e0(t_e0), .in_o(t_o), .in_e1(t_e1),
    .out_valid(p_valid), .out_l(p_l), .out_h(p_h)
  );

  dwt_mem_unit2 u_m2 (
    .clk, .we(m2_we), .addr_l(m2_addr_l), .data_l(p_l), .addr_h(m2_addr_h), .data_h(p_h),
    .rd_addr(xfer_rd ? xfer_rd_addr : rd_addr), .rd_data
  );
endmodule

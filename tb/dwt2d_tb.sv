// dwt2d_tb: loads random 8x8 blocks into the 2-D DWT, runs one, two and three
// decomposition levels and compares every coefficient with a double-precision
// 5/3 lifting transform (symmetric extension, rows then columns, Mallat
// layout) computed here. Also exercises the memory units, processor and
// controller inside the block, and checks that done arrives in bounded time.
module dwt2d_tb;
  import hwt_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_en = 0, start = 0;
  logic [5:0] ld_addr = '0, rd_addr = '0;
  fp32_t ld_data = '0, rd_data;
  logic [1:0] level = 2'd1;
  logic busy, done;
  int checks = 0, failures = 0;
  real blk[64];
  always #5 clk = ~clk;

  dwt2d dut (.clk, .rst_n, .ld_en, .ld_addr, .ld_data, .start, .level, .busy, .done,
             .rd_addr, .rd_data);

  task automatic lift(inout real x[8], input int s);
    real h[4], l[4];
    for (int n = 0; n < s / 2; n++) begin
      real nx;
      nx = (2 * n + 2 < s) ? x[2*n+2] : x[s-2];
      h[n] = x[2*n+1] - 0.5 * (x[2*n] + nx);
    end
    for (int n = 0; n < s / 2; n++)
      l[n] = x[2*n] + 0.25 * ((n > 0 ? h[n-1] : h[0]) + h[n]);
    for (int n = 0; n < s / 2; n++) begin x[n] = l[n]; x[s/2+n] = h[n]; end
  endtask

  task automatic ref_dwt(inout real b[64], input int lv);
    real line[8];
    int s;
    s = 8;
    for (int k = 0; k < lv; k++) begin
      for (int r = 0; r < s; r++) begin
        for (int c = 0; c < s; c++) line[c] = b[r*8+c];
        lift(line, s);
        for (int c = 0; c < s; c++) b[r*8+c] = line[c];
      end
      for (int c = 0; c < s; c++) begin
        for (int r = 0; r < s; r++) line[r] = b[r*8+c];
        lift(line, s);
        for (int r = 0; r < s; r++) b[r*8+c] = line[r];
      end
      s = s / 2;
    end
  endtask

  task automatic run(input int lv);
    real b[64];
    int t;
    for (int i = 0; i < 64; i++) begin
      blk[i] = real'($urandom % 256);
      b[i] = blk[i];
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); ld_en = 1; ld_addr = 6'(i); ld_data = r2f(blk[i]);
    end
    @(negedge clk); ld_en = 0; start = 1; level = 2'(lv);
    @(negedge clk); start = 0;
    t = 0;
    while (!done && t < 2000) begin @(posedge clk); t++; end
    checks++;
    if (!done) begin failures++; $display("FAIL no done at level %0d", lv); end
    ref_dwt(b, lv);
    for (int i = 0; i < 64; i++) begin
      real err;
      @(negedge clk); rd_addr = 6'(i);
      @(posedge clk); #1;
      err = f2r(rd_data) - b[i];
      if (err < 0) err = -err;
      checks++;
      if (err > 1e-3) begin
        failures++;
        if (failures < 10) $display("FAIL level %0d coef %0d got %f expected %f", lv, i, f2r(rd_data), b[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      run(1); run(2); run(3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

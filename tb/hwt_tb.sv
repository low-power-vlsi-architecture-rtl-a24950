// hwt_tb: sends random and smooth 8x8 pixel blocks through the hyperanalytic
// wavelet transform at one, two and three levels, with random output stalls,
// and compares all 4 x 64 coefficients of each block with the
// double-precision reference (Hilbert transforms of the zero-padded lines,
// 5/3 lifting DWTs, sum/difference combination). Also checks the component
// and position tags, the block-end flag and that the processor was flushed
// with non-live frames while Hx{f} was not yet complete.
module hwt_tb;
  import hwt_pkg::*;
  import tb_fp_pkg::*;
  import tb_hwt_ref_pkg::*;
  localparam int NB = 6;
  logic clk = 0, rst_n = 0;
  logic [1:0] level = 2'd1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  logic [7:0] in_pix = '0;
  fp32_t out_coef;
  logic [1:0] out_comp;
  logic [5:0] out_pos;
  int checks = 0, failures = 0, nout = 0, flush = 0;
  real ref_o[NB][4][64];
  always #5 clk = ~clk;

  hwt dut (.clk, .rst_n, .level, .in_valid, .in_ready, .in_pix, .out_valid, .out_ready,
           .out_coef, .out_comp, .out_pos, .out_last);

  always @(posedge clk) if (rst_n) begin
    if (dut.d_in_valid && !dut.d_in_live) flush++;
    if (out_valid && out_ready) begin
      int b, c, p;
      real e, err;
      b = nout / 256; c = (nout / 64) % 4; p = nout % 64;
      e = ref_o[b][c][p];
      err = f2r(out_coef) - e;
      if (err < 0) err = -err;
      checks++;
      if (err > 0.02 + 1e-5 * (e < 0 ? -e : e) || out_comp != 2'(c) || out_pos != 6'(p)
          || out_last != (c == 3 && p == 63)) begin
        failures++;
        if (failures < 10) $display("FAIL blk %0d comp %0d pos %0d got %f expected %f", b, c, p, f2r(out_coef), e);
      end
      nout++;
    end
    out_ready <= ($urandom % 4 != 0);
  end

  initial begin
    blk_t f;
    int pix[NB][64];
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 64; i++) begin
        pix[b][i] = (b % 2 == 0) ? int'($urandom % 256)
                                 : 100 + 10 * (i / 8) + 5 * (i % 8) + int'($urandom % 4);
        f[i] = real'(pix[b][i]);
      end
      hwt_ref(f, b % 3 + 1, ref_o[b]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      level = 2'(b % 3 + 1);
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        in_valid = 1; in_pix = 8'(pix[b][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
      while (nout < (b + 1) * 256) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks += 2;
    if (nout != NB * 256) begin failures++; $display("FAIL %0d outputs", nout); end
    if (flush == 0) begin failures++; $display("FAIL no flushing frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

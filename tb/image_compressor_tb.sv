// image_compressor_tb: end-to-end test of the compressor at its default
// parameters. It sends NB pixel blocks cut from a synthetic test image
// (smooth shading, an edge and noise), at one, then two, then three DWT
// levels, with random input gaps and output stalls. It decodes the bit stream
// (Huffman table and codes, run-length pairs, zigzag order) and compares
// every quantized coefficient with the double-precision reference model.
// Off-by-one results are allowed where rounding in single precision can
// tip the result (at most 1 in 50). It counts the mechanisms of the design
// (input and output stalls, zero runs, end-of-block pairs, level switches,
// flushing frames in the Hilbert processor); one that never happened is a
// failure. Prints the compression ratio reached.
module image_compressor_tb;
  import tb_vle_pkg::*;
  import tb_hwt_ref_pkg::*;
  localparam int NB = 6;
  logic clk = 0, rst_n = 0;
  logic [1:0] level = 2'd1;
  logic pix_valid = 0, pix_ready, bit_valid, bit_ready = 1, bit_out, bit_last;
  logic [7:0] pix = '0;
  int checks = 0, failures = 0, off1 = 0, ncoef = 0;
  int in_stall = 0, out_stall = 0, zruns = 0, eobs = 0, lvl_sw = 0, flush = 0, nbits = 0, nlast = 0;
  logic bits[$], lasts[$];
  always #5 clk = ~clk;

  image_compressor dut (.clk, .rst_n, .level, .pix_valid, .pix_ready, .pix, .bit_valid,
                        .bit_ready, .bit_out, .bit_last);

  always @(posedge clk) if (rst_n) begin
    if (pix_valid && !pix_ready) in_stall++;
    if (bit_valid && !bit_ready) out_stall++;
    if (dut.u_hwt.d_in_valid && !dut.u_hwt.d_in_live) flush++;
    if (bit_valid && bit_ready) begin
      bits.push_back(bit_out); lasts.push_back(bit_last); nbits++;
      if (bit_last) nlast++;
    end
    bit_ready <= ($urandom % 6 != 0);
  end

  function automatic int img(input int x, input int y);
    int v = 110 + int'(50.0 * $sin(real'(x) / 9.0) * $cos(real'(y) / 13.0)) + (x > 2 * y ? 40 : 0)
            + int'($urandom % 6);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    int pixv[NB][64];
    real ro[NB][4][64];
    blk_t f;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 64; i++) begin
        pixv[b][i] = img(8 * b + i % 8, 8 * (b / 3) + i / 8);
        f[i] = real'(pixv[b][i]);
      end
      hwt_ref(f, b * 3 / NB + 1, ro[b]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      if (b > 0 && 2'(b * 3 / NB + 1) != level) lvl_sw++;
      level = 2'(b * 3 / NB + 1);
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        pix_valid = ($urandom % 4 != 0);
        pix = 8'(pixv[b][i]);
        if (!pix_valid) begin i--; continue; end
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
      end
      @(negedge clk); pix_valid = 0;
      // hold the level until this block's transform has started
      while (nlast < 4 * b) @(posedge clk);
    end
    while (nlast < 4 * NB) @(posedge clk);
    repeat (10) @(posedge clk);
    // decode and compare
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < 4; c++) begin
        byte_q_t syms;
        int db, coef[64];
        bit ok;
        ok = huff_block(bits, lasts, syms, db);
        foreach (syms[i]) if (syms[i] == 0 && i + 1 < syms.size()) begin
          if (syms[i+1] == 8'hff) eobs++; else zruns++;
        end
        ok = ok && rle_block(syms, coef);
        checks++;
        if (!ok) begin failures++; $display("FAIL block %0d comp %0d undecodable", b, c); continue; end
        for (int i = 0; i < 64; i++) begin
          int e, d;
          e = quant(ro[b][c][ZZ[i]], ZZ[i]);
          d = coef[i] - e;
          checks++; ncoef++;
          if (d == 1 || d == -1) off1++;
          else if (d != 0) begin
            failures++;
            if (failures < 10) $display("FAIL block %0d comp %0d zz %0d got %0d expected %0d", b, c, i, coef[i], e);
          end
        end
      end
    checks++;
    if (off1 * 50 > ncoef) begin failures++; $display("FAIL %0d off-by-one results", off1); end
    $display("mechanisms: input stalls %0d, output stalls %0d, zero runs %0d, end-of-block %0d, level switches %0d, flushing samples %0d",
             in_stall, out_stall, zruns, eobs, lvl_sw, flush);
    if (in_stall == 0)  begin failures++; $display("FAIL no input stall"); end
    if (out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    if (zruns == 0)     begin failures++; $display("FAIL no zero run"); end
    if (eobs == 0)      begin failures++; $display("FAIL no end-of-block"); end
    if (lvl_sw == 0)    begin failures++; $display("FAIL no level switch"); end
    if (flush == 0)     begin failures++; $display("FAIL no flushing frame"); end
    checks += 6;
    $display("compression: %0d pixels, %0d bits, ratio %0.2f", NB * 64, nbits, real'(NB * 64 * 8) / real'(nbits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

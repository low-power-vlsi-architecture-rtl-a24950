// vle_tb: sends random sparse blocks of quantized coefficients (larger values
// and fewer zeros towards the top-left) through the variable length encoder
// with output stalls, decodes the bit stream here (Huffman, run-length,
// zigzag) and compares every coefficient with the input.
module vle_tb;
  import tb_vle_pkg::*;
  import tb_hwt_ref_pkg::*;
  localparam int NB = 25;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, bit_valid, bit_ready = 1, bit_out, bit_last;
  logic signed [7:0] in_q = '0;
  int checks = 0, failures = 0, nlast = 0;
  logic bits[$], lasts[$];
  int blk[NB][64];
  always #5 clk = ~clk;

  vle dut (.clk, .rst_n, .in_valid, .in_ready, .in_q, .bit_valid, .bit_ready, .bit_out, .bit_last);

  always @(posedge clk) if (rst_n) begin
    if (bit_valid && bit_ready) begin
      bits.push_back(bit_out); lasts.push_back(bit_last);
      if (bit_last) nlast++;
    end
    bit_ready <= ($urandom % 4 != 0);
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++) begin
        int r = i / 8, c = i % 8;
        blk[b][i] = ($urandom % 16 > r + c) ? int'($urandom % 61) - 30 : 0;
        if (b == 0) blk[b][i] = 0;                     // all-zero block
        if (b == 1) blk[b][i] = (i % 7) - 3;           // few zeros
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        in_valid = 1; in_q = 8'(blk[b][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk); in_valid = 0;
      end
    while (nlast < NB) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      byte_q_t syms;
      int db, coef[64];
      bit ok;
      ok = huff_block(bits, lasts, syms, db) && rle_block(syms, coef);
      checks++;
      if (!ok) begin failures++; $display("FAIL block %0d undecodable", b); break; end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (coef[i] != blk[b][ZZ[i]]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d zz %0d got %0d expected %0d", b, i, coef[i], blk[b][ZZ[i]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// huffman_encoder_tb: sends blocks of symbols with skewed, random histograms
// (including a block of one repeated symbol and a block of all-different
// symbols) with random output stalls. Each coded block is decoded here: the
// code table must be prefix-free, the decoded symbols must equal the input,
// and the number of data bits must equal that of an optimal Huffman code,
// computed here by repeatedly joining the two smallest counts.
module huffman_encoder_tb;
  import tb_vle_pkg::*;
  localparam int NB = 30;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_bit, out_last;
  logic [7:0] in_sym = '0;
  int checks = 0, failures = 0;
  logic bits[$], lasts[$];
  byte_q_t blocks[NB];
  always #5 clk = ~clk;

  huffman_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_sym, .in_last, .out_valid,
                       .out_ready, .out_bit, .out_last);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin bits.push_back(out_bit); lasts.push_back(out_last); end
    out_ready <= ($urandom % 5 != 0);
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      int n;
      n = 1 + $urandom % 100;
      if (b == 1) n = 40;
      for (int i = 0; i < n; i++) begin
        logic [7:0] s;
        case ($urandom % 4)
          0, 1: s = 8'($urandom % 3);
          2:    s = 8'($urandom % 12);
          default: s = 8'($urandom);
        endcase
        if (b == 1) s = 8'd7;                   // single distinct symbol
        if (b == 2) s = 8'(i);                  // all distinct
        blocks[b].push_back(s);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < blocks[b].size(); i++) begin
        @(negedge clk);
        in_valid = 1; in_sym = blocks[b][i]; in_last = (i == blocks[b].size() - 1);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk); in_valid = 0;
      end
    repeat (5000) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      byte_q_t got;
      int db, hist[256];
      int w[$];
      bit ok;
      ok = huff_block(bits, lasts, got, db);
      checks++;
      if (!ok || got != blocks[b]) begin
        failures++;
        $display("FAIL block %0d decode ok=%0d size %0d/%0d", b, ok, got.size(), blocks[b].size());
        break;
      end
      w.delete();
      for (int i = 0; i < 256; i++) hist[i] = 0;
      foreach (blocks[b][i]) hist[blocks[b][i]]++;
      for (int i = 0; i < 256; i++) if (hist[i] > 0) w.push_back(hist[i]);
      checks++;
      if (db != huff_cost(w)) begin
        failures++;
        $display("FAIL block %0d: %0d data bits, optimum %0d", b, db, huff_cost(w));
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

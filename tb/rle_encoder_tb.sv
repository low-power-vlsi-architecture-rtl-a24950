// rle_encoder_tb: first sends the sample sequence 17 8 54 0 0 0 97 5 16 0 45
// 23 0 0 0 0 43 (padded with zeros to 64) and checks for 17 8 54 0 2 97 5 16
// 0 0 45 23 0 3 43 followed by the end-of-block pair 0 FF. Then random sparse
// blocks with output stalls: the output is decoded here (0 k -> k+1 zeros,
// 0 FF -> zeros to the end of the block) and compared with the input block.
module rle_encoder_tb;
  localparam int NB = 40;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic signed [7:0] in_data = '0;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  logic [7:0] bytes[$];
  logic lasts[$];
  logic signed [7:0] blk[NB][64];
  always #5 clk = ~clk;

  rle_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .out_valid,
                   .out_ready, .out_data, .out_last);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin bytes.push_back(out_data); lasts.push_back(out_last); end
    out_ready <= ($urandom % 4 != 0);
  end

  task automatic send(input int b);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = blk[b][i]; in_last = (i == 63);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int sample[17] = '{17, 8, 54, 0, 0, 0, 97, 5, 16, 0, 45, 23, 0, 0, 0, 0, 43};
    int expect_b[17] = '{17, 8, 54, 0, 2, 97, 5, 16, 0, 0, 45, 23, 0, 3, 43, 0, 255};
    for (int i = 0; i < 64; i++) blk[0][i] = (i < 17) ? 8'(sample[i]) : 8'sd0;
    for (int b = 1; b < NB; b++)
      for (int i = 0; i < 64; i++)
        blk[b][i] = ($urandom % 100 < 60 - i) ? 8'($urandom % 255 + 1) : 8'sd0;
    for (int i = 0; i < 64; i++) blk[NB-1][i] = 8'(i + 1);      // no zeros at all
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) send(b);
    repeat (200) @(posedge clk);
    // table example
    for (int i = 0; i < 17; i++) begin
      checks++;
      if (bytes[i] != 8'(expect_b[i])) begin
        failures++;
        $display("FAIL sample byte %0d got %0d expected %0d", i, bytes[i], expect_b[i]);
      end
    end
    // decode all blocks
    for (int b = 0; b < NB; b++) begin
      int n;
      logic [7:0] c;
      logic l;
      n = 0; l = 0;
      while (n < 64 && bytes.size() > 0) begin
        c = bytes.pop_front(); l = lasts.pop_front();
        if (c != 0) begin
          checks++;
          if (blk[b][n] != c) begin failures++; $display("FAIL block %0d coef %0d", b, n); end
          n++;
        end else begin
          c = bytes.pop_front(); l = lasts.pop_front();
          for (int z = 0; z < ((c == 8'hff) ? 64 - n : int'(c) + 1); z++) begin
            checks++;
            if (blk[b][n+z] != 0) begin failures++; $display("FAIL block %0d zero %0d", b, n + z); end
          end
          n = (c == 8'hff) ? 64 : n + int'(c) + 1;
        end
      end
      checks++;
      if (n != 64 || !l) begin failures++; $display("FAIL block %0d framing n=%0d last=%0d", b, n, l); end
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

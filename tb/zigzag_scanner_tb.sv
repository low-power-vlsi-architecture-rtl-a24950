// zigzag_scanner_tb: writes random 8x8 blocks in raster order with random
// input gaps and output stalls, and checks that each block comes out in the
// JPEG zigzag order (table written out here), with out_last on the 64th
// value and no block lost while both ping-pong banks are busy.
module zigzag_scanner_tb;
  localparam int ZZ[64] = '{0,1,8,16,9,2,3,10,17,24,32,25,18,11,4,5,12,19,26,33,40,48,
    41,34,27,20,13,6,7,14,21,28,35,42,49,56,57,50,43,36,29,22,15,23,30,37,44,51,58,59,
    52,45,38,31,39,46,53,60,61,54,47,55,62,63};
  localparam int NB = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic signed [7:0] in_data = '0, out_data;
  int checks = 0, failures = 0, nout = 0, stalls = 0;
  logic [7:0] blk[NB][64];
  always #5 clk = ~clk;

  zigzag_scanner dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
                      .out_data, .out_last);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (out_valid && out_ready) begin
      int b, i;
      b = nout / 64; i = nout % 64;
      checks++;
      if (out_data != blk[b][ZZ[i]] || out_last != (i == 63)) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d item %0d got %0d expected %0d", b, i, out_data, blk[b][ZZ[i]]);
      end
      nout++;
    end
    out_ready <= (nout < 640) ? ($urandom % 8 != 0) : ($urandom % 3 == 0);
  end

  initial begin
    for (int b = 0; b < NB; b++) for (int i = 0; i < 64; i++) blk[b][i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NB * 64; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 5 != 0);
      in_data = blk[n/64][n%64];
      if (!in_valid) begin n--; continue; end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (2000) @(posedge clk);
    checks += 2;
    if (nout != NB * 64) begin failures++; $display("FAIL %0d outputs", nout); end
    if (stalls == 0) begin failures++; $display("FAIL the input was never held off"); end
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

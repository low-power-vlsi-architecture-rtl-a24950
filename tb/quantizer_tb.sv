// quantizer_tb: sends random coefficients (multiples of 1/16, both signs,
// magnitudes up to about 4000) at random table positions through the
// quantizer while out_ready toggles randomly. Each result is compared with
// round(|f| / Q) (halves away from zero), clipped to 127 and signed, with Q
// taken from the JPEG luminance table written out here. Also checks the
// 20-clock latency without stalls and the block-end flag.
module quantizer_tb;
  import hwt_pkg::*;
  import tb_fp_pkg::*;
  localparam int Q[64] = '{16,11,10,16,24,40,51,61, 12,12,14,19,26,58,60,55,
    14,13,16,24,40,57,69,56, 14,17,22,29,51,87,80,62, 18,22,37,56,68,109,103,77,
    24,35,55,64,81,104,113,92, 49,64,78,87,103,121,120,101, 72,92,95,98,112,100,103,99};
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  fp32_t in_coef = '0;
  logic [5:0] in_pos = '0;
  logic signed [7:0] out_q;
  int checks = 0, failures = 0, cyc = 0, t_first = -1, t_in = -1;
  int exp_q[$];
  logic exp_l[$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  quantizer dut (.clk, .rst_n, .in_valid, .in_ready, .in_coef, .in_pos, .in_last,
                 .out_valid, .out_ready, .out_q, .out_last);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    logic el;
    if (t_first < 0) t_first = cyc;
    e = exp_q.pop_front();
    el = exp_l.pop_front();
    checks++;
    if (int'(out_q) != e || out_last != el) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d expected %0d", out_q, e);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int a, p, e;
      real f;
      @(negedge clk);
      if (i > 200) out_ready = ($urandom % 4 != 0);
      if (!in_ready) begin i--; continue; end
      a = (i % 3 == 0) ? int'($urandom % 65536) : int'($urandom % 4096);
      p = $urandom % 64;
      f = real'(a) / 16.0;
      if ($urandom % 2) f = -f;
      e = (2 * a + 16 * Q[p]) / (32 * Q[p]);        // floor(|f|/Q + 1/2)
      if (e > 127) e = 127;
      if (f < 0) e = -e;
      in_valid = 1; in_coef = r2f(f); in_pos = 6'(p); in_last = (p == 63);
      exp_q.push_back(e); exp_l.push_back(p == 63);
      if (i == 0) t_in = cyc;
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (40) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    if (t_first - t_in != 21) begin failures++; $display("FAIL latency %0d", t_first - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

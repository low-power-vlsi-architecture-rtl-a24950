// dht16_tb: streams random real frames of 16 samples through the Hilbert
// transform processor, one per clock, then flushing samples. Each live output
// is compared with the discrete Hilbert transform computed directly in double
// precision, xh(n) = sum_k (-j sgn k) X(k) e^{j 2 pi k n/16} / 16. Also
// checks the 80-clock latency of continuous streaming and the output count.
module dht16_tb;
  import hwt_pkg::*;
  import tb_fp_pkg::*;
  localparam int NFR = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_live = 0;
  fp32_t in_x = '0;
  logic out_valid, out_live;
  fp32_t out_y;
  int checks = 0, failures = 0;
  real x[NFR*16];
  real exp_q[$];
  int t_in0 = -1, t_out0 = -1, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  dht16 dut (.clk, .rst_n, .in_valid, .in_live, .in_x, .out_valid, .out_live, .out_y);

  always @(posedge clk) if (rst_n && out_valid && out_live) begin
    real e, err;
    if (t_out0 < 0) t_out0 = cyc;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
    end else begin
      e = exp_q.pop_front();
      err = f2r(out_y) - e;
      if (err < 0) err = -err;
      if (err > 2e-3) begin
        failures++;
        if (failures < 10) $display("FAIL got %f expected %f", f2r(out_y), e);
      end
    end
  end

  initial begin
    for (int i = 0; i < NFR * 16; i++) x[i] = f2r(r2f(real'($urandom % 256)));
    for (int f = 0; f < NFR; f++)
      for (int n = 0; n < 16; n++) begin
        real acc;
        acc = 0.0;
        // xh(n) = (1/N) sum_m x(m) sum_k (-j sgn k) e^{j 2 pi k (n-m)/N}
        //       = (1/N) sum_m x(m) * sum_{k=1}^{7} 2 sin(2 pi k (n-m)/N)
        for (int m = 0; m < 16; m++)
          for (int k = 1; k < 8; k++)
            acc += x[f*16+m] * 2.0 * $sin(2.0 * 3.14159265358979 * real'(k * (n - m)) / 16.0);
        exp_q.push_back(acc / 16.0);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NFR * 16; i++) begin
      @(negedge clk);
      if (i == 0) t_in0 = cyc;
      in_valid = 1; in_live = 1; in_x = r2f(x[i]);
    end
    for (int i = 0; i < 80; i++) begin
      @(negedge clk);
      in_valid = 1; in_live = 0; in_x = '0;
    end
    @(negedge clk); in_valid = 0;
    repeat (30) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    if (t_out0 - t_in0 != 81) begin  // 80 clocks plus the clock that takes the first sample
      failures++;
      $display("FAIL latency %0d clocks, expected 81", t_out0 - t_in0);
    end
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

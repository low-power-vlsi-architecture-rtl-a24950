// dht_p4_tb: drives frames of 16 random complex samples through both
// configurations of P4 and checks each output: with the Hilbert filter,
// swap(-j sgn(k) x); without it, swap(x). Also checks the one-clock latency.
module dht_p4_tb;
  import hwt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_live = 0;
  cplx_t in_data = '0;
  logic ov_h, ol_h, ov_s, ol_s;
  cplx_t od_h, od_s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dht_p4 #(.HILBERT(1'b1)) dut_h (.clk, .rst_n, .in_valid, .in_live, .in_data,
    .out_valid(ov_h), .out_live(ol_h), .out_data(od_h));
  dht_p4 #(.HILBERT(1'b0)) dut_s (.clk, .rst_n, .in_valid, .in_live, .in_data,
    .out_valid(ov_s), .out_live(ol_s), .out_data(od_s));

  initial begin
    cplx_t x, eh, es;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 160; i++) begin
      int k;
      k = i % 16;
      @(negedge clk);
      x = '{re: $urandom, im: $urandom};
      in_valid = 1; in_live = 1; in_data = x;
      es = '{re: x.im, im: x.re};
      if (k == 0 || k == 8) eh = '0;
      else if (k < 8)       eh = '{re: {~x.re[31], x.re[30:0]}, im: x.im};    // swap(-j x)
      else                  eh = '{re: x.re, im: {~x.im[31], x.im[30:0]}};    // swap(+j x)
      @(posedge clk); #1;
      checks += 2;
      if (!(ov_h && ol_h && od_h == eh)) begin
        failures++;
        if (failures < 10) $display("FAIL hilbert k=%0d got %h expected %h", k, od_h, eh);
      end
      if (!(ov_s && ol_s && od_s == es)) begin
        failures++;
        if (failures < 10) $display("FAIL swap k=%0d", k);
      end
      // occasional idle clock: the index must not advance
      if ($urandom % 4 == 0) begin
        @(negedge clk); in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

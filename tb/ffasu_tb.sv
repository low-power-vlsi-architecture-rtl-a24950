// ffasu_tb: checks both outputs of the fused add-subtract unit against sums
// and differences formed in double precision and rounded to single. Operands
// cover close exponents (cancellation), far exponents (alignment and sticky
// bits), equal magnitudes and zeros. A one-ulp difference is tolerated because
// the reference rounds twice (to double, then to single).
module ffasu_tb;
  import hwt_pkg::*;
  import tb_fp_pkg::*;
  fp32_t a, b, s, d;
  int checks = 0, failures = 0;
  ffasu dut (.a(a), .b(b), .sum(s), .diff(d));

  function automatic fp32_t rnd_fp(input int emin, input int emax);
    int unsigned e;
    e = emin + ($urandom % (emax - emin + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic bit close(input fp32_t x, input fp32_t y);
    return ulp_dist(x, y) <= 1;
  endfunction

  task automatic check(input fp32_t x, input fp32_t y);
    fp32_t es, ed;
    a = x; b = y;
    #1;
    es = r2f(f2r(x) + f2r(y));
    ed = r2f(f2r(x) - f2r(y));
    checks += 2;
    if (!close(s, es)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h expected %h", x, y, s, es);
    end
    if (!close(d, ed)) begin
      failures++;
      if (failures < 10) $display("FAIL %h - %h = %h expected %h", x, y, d, ed);
    end
  endtask

  initial begin
    check(32'h3f800000, 32'h40000000);
    check(32'h40400000, 32'h40400000);
    check(32'h40400000, 32'hc0400000);
    check(32'h00000000, 32'hc0400000);
    check(32'h3f800001, 32'h3f800000);
    for (int i = 0; i < 10000; i++) check(rnd_fp(120, 130), rnd_fp(120, 130));
    for (int i = 0; i < 10000; i++) check(rnd_fp(60, 190), rnd_fp(60, 190));
    for (int i = 0; i < 5000; i++) begin
      fp32_t x = rnd_fp(100, 150);
      check(x, {~x[31], x[30:23], x[22:0] ^ 23'($urandom % 4)});
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

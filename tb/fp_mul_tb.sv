// fp_mul_tb: checks the single-precision multiplier against products worked
// out in double precision and rounded to single with the simulator's own
// real-number conversion. Random normal operands plus zeros and signs.
module fp_mul_tb;
  import hwt_pkg::*;
  import tb_fp_pkg::*;
  fp32_t a, b, p;
  int checks = 0, failures = 0;
  fp_mul dut (.a(a), .b(b), .p(p));

  function automatic fp32_t rnd_fp(input int emin, input int emax);
    int unsigned e;
    e = emin + ($urandom % (emax - emin + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic check(input fp32_t x, input fp32_t y);
    fp32_t exp_p;
    a = x; b = y;
    #1;
    exp_p = r2f(f2r(x) * f2r(y));
    if (x[30:23] == 0 || y[30:23] == 0) exp_p = {x[31]^y[31], 31'd0};
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    check(32'h3f800000, 32'h40000000);          // 1 * 2
    check(32'hbf000000, 32'h40400000);          // -0.5 * 3
    check(32'h3f3504f3, 32'h3f3504f3);          // sqrt(.5)^2
    check(32'h00000000, 32'h40400000);          // 0 * 3
    for (int i = 0; i < 20000; i++) check(rnd_fp(64, 190), rnd_fp(64, 190));
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

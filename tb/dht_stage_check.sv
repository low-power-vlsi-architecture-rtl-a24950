// dht_stage_check: shared checker for the P0-P3 butterfly stages. It streams
// NFR random groups of 2L complex samples (one per clock), then flushing
// samples, collects the live outputs and compares them with the DIF
// butterfly worked out in double precision: for each group the L sums
// x[n] + x[n+L], then the L differences (x[n] - x[n+L]) * W16^(n*8/L).
// Prints the TB_RESULT line and ends the simulation.
module dht_stage_check #(
  parameter int KIND = 0,      // 0: P0 (span L), 1: P1, 2: P2, 3: P3
  parameter int L    = 1,
  parameter int NFR  = 40
);
  import hwt_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_live = 0;
  cplx_t in_data = '0;
  logic out_valid, out_live;
  cplx_t out_data;
  int checks = 0, failures = 0;
  real xr[NFR*2*L], xi[NFR*2*L];
  real er[$], ei[$];
  int nout = 0;

  always #5 clk = ~clk;

  if (KIND == 0) begin : g0
    logic dif;
    logic [$clog2(2*L)-1:0] k;
    dht_p0 #(.L(L)) dut (.clk, .rst_n, .in_valid, .in_live, .in_data,
      .out_valid, .out_live, .out_data, .out_diff(dif), .out_k(k));
  end else if (KIND == 1) begin : g1
    dht_p1 dut (.clk, .rst_n, .in_valid, .in_live, .in_data, .out_valid, .out_live, .out_data);
  end else if (KIND == 2) begin : g2
    dht_p2 dut (.clk, .rst_n, .in_valid, .in_live, .in_data, .out_valid, .out_live, .out_data);
  end else begin : g3
    dht_p3 dut (.clk, .rst_n, .in_valid, .in_live, .in_data, .out_valid, .out_live, .out_data);
  end

  function automatic real rnd();
    return (real'($urandom % 20001) - 10000.0) / 100.0;
  endfunction

  task automatic cmp(input fp32_t got, input real exp);
    real err;
    err = f2r(got) - exp;
    if (err < 0) err = -err;
    checks++;
    if (err > 1e-3) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d: got %f expected %f", nout, f2r(got), exp);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_live) begin
    if (er.size() == 0) begin
      failures++;
      $display("FAIL unexpected live output");
    end else begin
      cmp(out_data.re, er.pop_front());
      cmp(out_data.im, ei.pop_front());
    end
    nout++;
  end

  initial begin
    // expected values
    for (int i = 0; i < NFR * 2 * L; i++) begin
      xr[i] = f2r(r2f(rnd()));
      xi[i] = f2r(r2f(rnd()));
    end
    for (int f = 0; f < NFR; f++) begin
      for (int n = 0; n < L; n++) begin
        er.push_back(xr[f*2*L+n] + xr[f*2*L+n+L]);
        ei.push_back(xi[f*2*L+n] + xi[f*2*L+n+L]);
      end
      for (int n = 0; n < L; n++) begin
        real dr, di, ang, wr, wi;
        dr = xr[f*2*L+n] - xr[f*2*L+n+L];
        di = xi[f*2*L+n] - xi[f*2*L+n+L];
        ang = 2.0 * 3.14159265358979 * real'(n * 8 / L) / 16.0;
        wr = $cos(ang);
        wi = -$sin(ang);
        if (KIND == 0) begin wr = 1.0; wi = 0.0; end
        er.push_back(dr * wr - di * wi);
        ei.push_back(dr * wi + di * wr);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NFR * 2 * L; i++) begin
      @(negedge clk);
      in_valid = 1; in_live = 1;
      in_data = '{re: r2f(xr[i]), im: r2f(xi[i])};
    end
    for (int i = 0; i < 2 * L; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 2) == 0 || i == 2 * L - 1;
      in_live = 0;
      in_data = '0;
      if (!in_valid) i--;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (er.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", er.size());
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

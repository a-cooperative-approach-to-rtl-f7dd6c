// tb_fev: the four fitness evaluators against reference values computed
// with real arithmetic from the benchmark definitions:
//   One-Max  L - ones                     F1  10^4 * sum x^2, x in [-5.12,5.11]
//   F2       8000^4 * (100(x1^2-x2)^2 + (1-x1)^2)
//   F3       sum floor(x) + 30
// on corner chromosomes and 500 random ones each.
module tb_fev;
  import cocga_pkg::*;
  logic [31:0] c_om;
  logic [29:0] c_f1, c_f2;
  logic [49:0] c_f3;
  cost_t k_om, k_f1, k_f2, k_f3;
  int checks = 0, failures = 0;

  fev #(.FUNC(FN_ONEMAX)) u_om (.chrom(c_om), .cost(k_om));
  fev #(.FUNC(FN_F1))     u_f1 (.chrom(c_f1), .cost(k_f1));
  fev #(.FUNC(FN_F2))     u_f2 (.chrom(c_f2), .cost(k_f2));
  fev #(.FUNC(FN_F3))     u_f3 (.chrom(c_f3), .cost(k_f3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real xval(int raw, int offset, real scale);
    return (raw - offset) / scale;
  endfunction

  task automatic run_one();
    real r, x1, x2, t;
    int ones;
    #1;
    ones = $countones(c_om);
    check(k_om == cost_t'(32 - ones), $sformatf("One-Max %h", c_om));
    r = 0.0;
    for (int k = 0; k < 3; k++) begin
      t = xval(int'(c_f1[k*10 +: 10]), 512, 100.0);
      r += t * t;
    end
    check(k_f1 == cost_t'($rtoi(r * 10000.0 + 0.5)), $sformatf("F1 %h: %0d vs %f", c_f1, k_f1, r));
    x1 = xval(int'(c_f2[14:0]), 16384, 8000.0);
    x2 = xval(int'(c_f2[29:15]), 16384, 8000.0);
    r = 100.0 * (x1 * x1 - x2) * (x1 * x1 - x2) + (1.0 - x1) * (1.0 - x1);
    t = r * 4096.0e12;   // 8000^4
    begin
      real got, err;
      got = 0.0;
      for (int i = FIT_W - 1; i >= 0; i--) got = got * 2.0 + (k_f2[i] ? 1.0 : 0.0);
      err = (got > t) ? got - t : t - got;
      check(err <= 1.0e-9 * t + 1.0, $sformatf("F2 %h: %f vs %f", c_f2, got, t));
    end
    r = 30.0;
    for (int k = 0; k < 5; k++) r += $floor(xval(int'(c_f3[k*10 +: 10]), 512, 100.0));
    check(k_f3 == cost_t'($rtoi(r)), $sformatf("F3 %h: %0d vs %f", c_f3, k_f3, r));
  endtask

  initial begin
    // corners: all zeros, all ones, optimum points
    c_om = '0; c_f1 = '0; c_f2 = '0; c_f3 = '0; run_one();
    c_om = '1; c_f1 = '1; c_f2 = '1; c_f3 = '1; run_one();
    check(k_om == 0, "One-Max optimum cost 0");
    c_f1 = {10'd512, 10'd512, 10'd512}; run_one();
    check(k_f1 == 0, "F1 optimum cost 0");
    c_f2 = {15'd24384, 15'd24384}; run_one();   // x1 = x2 = 1
    check(k_f2 == 0, "F2 optimum cost 0");
    c_f3 = '0; run_one();
    check(k_f3 == 0, "F3 minimum (all x = -5.12) cost 0");
    c_f3 = {10'd499, 10'd500, 10'd511, 10'd412, 10'd411}; run_one();
    for (int n = 0; n < 500; n++) begin
      c_om = $urandom;
      c_f1 = 30'($urandom);
      c_f2 = 30'($urandom);
      c_f3 = {18'($urandom), $urandom};
      run_one();
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

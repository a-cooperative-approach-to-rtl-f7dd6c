// tb_cocga_workloads: the De Jong benchmarks F1 (30 bits), F2 (30 bits) and
// F3 (50 bits), each on its own CoCGA group run from reset to the end of
// the search. For each: the reported best cost must equal a reference value
// computed with real arithmetic from the reported best chromosome, every
// group must cooperate (at least one vector accepted by its leader) and the
// final objective value must be near the optimum:
//   F1 < 0.5 (optimum 0), F2 < 0.5 (optimum 0), F3 <= -20 (optimum -30).
// The number of machine cycles (generations of cell 0) is printed for each.
module tb_cocga_workloads;
  import cocga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real to_real(cost_t c);
    real r;
    r = 0.0;
    for (int i = FIT_W - 1; i >= 0; i--) r = r * 2.0 + (c[i] ? 1.0 : 0.0);
    return r;
  endfunction

  // ---- three groups ----
  logic done1, done2, done3;
  cost_t bc1, bc2, bc3;
  logic [29:0] ch1, ch2;
  logic [49:0] ch3;
  logic acc1, acc2, acc3;
  logic [1:0] mc1, mc2, mc3;
  int nacc1 = 0, nacc2 = 0, nacc3 = 0, gen1 = 0, gen2 = 0, gen3 = 0;

  cocga_top #(.FUNC(FN_F1)) u_f1 (
    .clk(clk), .rst_n(rst_n), .done(done1), .best_cost(bc1), .best_chrom(ch1),
    .best_pv(), .cell_cc(), .leader_cc(), .leader_converged(), .accepted(acc1),
    .rejected(), .leader_state(), .cell_state(), .cell_mcycle(mc1), .cell_done());
  cocga_top #(.FUNC(FN_F2)) u_f2 (
    .clk(clk), .rst_n(rst_n), .done(done2), .best_cost(bc2), .best_chrom(ch2),
    .best_pv(), .cell_cc(), .leader_cc(), .leader_converged(), .accepted(acc2),
    .rejected(), .leader_state(), .cell_state(), .cell_mcycle(mc2), .cell_done());
  cocga_top #(.FUNC(FN_F3)) u_f3 (
    .clk(clk), .rst_n(rst_n), .done(done3), .best_cost(bc3), .best_chrom(ch3),
    .best_pv(), .cell_cc(), .leader_cc(), .leader_converged(), .accepted(acc3),
    .rejected(), .leader_state(), .cell_state(), .cell_mcycle(mc3), .cell_done());

  always @(posedge clk) begin
    if (acc1) nacc1++;
    if (acc2) nacc2++;
    if (acc3) nacc3++;
    if (mc1[0] && !done1) gen1++;
    if (mc2[0] && !done2) gen2++;
    if (mc3[0] && !done3) gen3++;
  end

  initial begin
    real f, x1, x2, ref_cost;
    longint ref_int;
    int r;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done1 && done2 && done3);
    repeat (2) @(posedge clk);
    // F1
    f = 0.0;
    for (int k = 0; k < 3; k++) begin
      r  = int'(ch1[k*10 +: 10]) - 512;
      x1 = r / 100.0;
      f += x1 * x1;
    end
    ref_int = longint'(f * 10000.0);  // real-to-integer cast rounds
    check(bc1 == cost_t'(ref_int), "F1 cost matches reference");
    check(f < 0.5, $sformatf("F1 near optimum (%f)", f));
    $display("F1: best %f, machine cycles %0d, accepted %0d", f, gen1, nacc1);
    // F2
    r  = int'(ch2[14:0]) - 16384;
    x1 = r / 8000.0;
    r  = int'(ch2[29:15]) - 16384;
    x2 = r / 8000.0;
    f = 100.0 * (x1 * x1 - x2) * (x1 * x1 - x2) + (1.0 - x1) * (1.0 - x1);
    ref_cost = f * 4096.0e12;
    check((to_real(bc2) - ref_cost) <= 1.0e-9 * ref_cost + 1.0
          && (ref_cost - to_real(bc2)) <= 1.0e-9 * ref_cost + 1.0, "F2 cost matches reference");
    check(f < 0.5, $sformatf("F2 near optimum (%f)", f));
    $display("F2: best %f, machine cycles %0d, accepted %0d", f, gen2, nacc2);
    // F3
    f = 0.0;
    for (int k = 0; k < 5; k++) begin
      r = int'(ch3[k*10 +: 10]) - 512;
      f += $floor(r / 100.0);
    end
    ref_int = longint'(f + 30.0);
    check(bc3 == cost_t'(ref_int), "F3 cost matches reference");
    check(f <= -20.0, $sformatf("F3 near optimum (%f)", f));
    $display("F3: best %f, machine cycles %0d, accepted %0d", f, gen3, nacc3);
    check(nacc1 > 0 && nacc2 > 0 && nacc3 > 0, "every group cooperated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmp: tournament and best-so-far record. Random costs (with many ties
// and repeats) are presented with `eval`; a software model gives the winner
// (a on ties), whether the winner beat the best so far, and the best cost
// and chromosome, which must hold while `eval` is low.
module tb_cmp;
  import cocga_pkg::*;
  localparam int L = 16;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  cost_t cost_a = '0, cost_b = '0, best_cost;
  logic [L-1:0] chrom_a = '0, chrom_b = '0, best_chrom;
  logic a_wins, improved;
  int checks = 0, failures = 0;

  cmp #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cost_t m_best;
    logic [L-1:0] m_chrom;
    bit m_aw, m_imp;
    int n_imp;
    m_best = '1; m_chrom = '0; n_imp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(best_cost == '1 && !improved, "reset state");
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      cost_a  = cost_t'($urandom_range(0, 60) + 1000 - n * 2);
      cost_b  = ($urandom_range(0, 3) == 0) ? cost_a : cost_t'($urandom_range(0, 60) + 1000 - n * 2);
      chrom_a = L'($urandom);
      chrom_b = L'($urandom);
      eval = 1'b1;
      m_aw = (cost_a <= cost_b);
      m_imp = ((m_aw ? cost_a : cost_b) < m_best);
      if (m_imp) begin
        m_best  = m_aw ? cost_a : cost_b;
        m_chrom = m_aw ? chrom_a : chrom_b;
        n_imp++;
      end
      @(negedge clk);
      eval = 1'b0;
      cost_a = '0; cost_b = '0;   // must be ignored without eval
      @(negedge clk);
      check(a_wins == m_aw, $sformatf("winner at %0d", n));
      check(improved == m_imp, $sformatf("improved at %0d", n));
      check(best_cost == m_best && best_chrom == m_chrom, $sformatf("best at %0d", n));
    end
    check(n_imp > 10, "improvements exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

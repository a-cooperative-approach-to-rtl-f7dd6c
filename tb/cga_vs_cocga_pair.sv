// cga_vs_cocga_pair: test helper for tb_cga_vs_cocga. Runs, from the same
// reset, one plain compact GA (a cocga_cell whose link is unused: its sends
// are taken and dropped, nothing is ever sent to it) and one CoCGA group on
// benchmark FUNC, and measures the clocks each needs until it ends. It
// checks each run's best cost against a reference value computed with real
// arithmetic from the best chromosome, and reports in machine cycles (four
// clocks each) the time to the end of the search and the time at which the
// best cost last changed.
module cga_vs_cocga_pair
  import cocga_pkg::*;
#(
  parameter func_e FUNC = FN_ONEMAX
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   both_done,
  output longint cga_clocks,
  output longint cocga_clocks,
  output int     checks,
  output int     failures
);
  localparam int unsigned L = chrom_len(FUNC);

  logic up_valid, dn_ready, cga_done, co_done;
  pv_t up_data;
  cost_t cga_cost, co_cost;
  logic [L-1:0] cga_chrom, co_chrom;

  cocga_cell #(.FUNC(FUNC), .CELL_ID(7)) u_cga (
    .clk(clk), .rst_n(rst_n), .up_valid(up_valid), .up_data(up_data), .up_ready(1'b1),
    .dn_valid(1'b0), .dn_data('0), .dn_ready(dn_ready), .cc(), .pv(), .done(cga_done),
    .best_cost(cga_cost), .best_chrom(cga_chrom), .state(), .mcycle());

  cocga_top #(.FUNC(FUNC)) u_co (
    .clk(clk), .rst_n(rst_n), .done(co_done), .best_cost(co_cost), .best_chrom(co_chrom),
    .best_pv(), .cell_cc(), .leader_cc(), .leader_converged(), .accepted(), .rejected(),
    .leader_state(), .cell_state(), .cell_mcycle(), .cell_done());

  function automatic real objective(input logic [L-1:0] c);
    real f, x1, x2;
    int r;
    f = 0.0;
    case (FUNC)
      FN_ONEMAX: f = real'($countones(c));
      FN_F1: for (int k = 0; k < 3; k++) begin
        r = int'(c[k*10 +: 10]) - 512;
        f += (r / 100.0) * (r / 100.0);
      end
      FN_F2: begin
        r  = int'(c[14:0]) - 16384;
        x1 = r / 8000.0;
        r  = int'(c[29:15]) - 16384;
        x2 = r / 8000.0;
        f  = 100.0 * (x1 * x1 - x2) * (x1 * x1 - x2) + (1.0 - x1) * (1.0 - x1);
      end
      default: for (int k = 0; k < 5; k++) begin
        r = int'(c[k*10 +: 10]) - 512;
        f += $floor(r / 100.0);
      end
    endcase
    return f;
  endfunction

  // cost as the hardware scales it, from the real objective
  function automatic real scaled(input real f);
    case (FUNC)
      FN_ONEMAX: return real'(L) - f;
      FN_F1:     return f * 10000.0;
      FN_F2:     return f * 4096.0e12;
      default:   return f + 30.0;
    endcase
  endfunction

  function automatic real to_real(cost_t c);
    real r;
    r = 0.0;
    for (int i = FIT_W - 1; i >= 0; i--) r = r * 2.0 + (c[i] ? 1.0 : 0.0);
    return r;
  endfunction

  function automatic bit close(real a, real b);
    real d;
    d = (a > b) ? a - b : b - a;
    return d <= 1.0e-9 * ((a > b) ? a : b) + 0.5;
  endfunction

  assign both_done = cga_done && co_done;

  initial begin
    cga_clocks = 0; cocga_clocks = 0; checks = 0; failures = 0;
  end

  // clock of the last change of each run's best cost (time to its best)
  longint cga_best_at = 0, co_best_at = 0, now = 0;
  cost_t  cga_prev = '1, co_prev = '1;
  always @(posedge clk) begin
    if (rst_n) begin
      now++;
      if (!cga_done) cga_clocks++;
      if (!co_done)  cocga_clocks++;
      if (cga_cost != cga_prev) cga_best_at = now;
      if (co_cost != co_prev)   co_best_at = now;
      cga_prev = cga_cost;
      co_prev  = co_cost;
    end
  end

  always @(posedge clk) begin
    if (rst_n && both_done && checks == 0) begin
      real fa, fb;
      fa = objective(cga_chrom);
      fb = objective(co_chrom);
      checks = 2;
      if (!close(to_real(cga_cost), scaled(fa))) begin
        failures++;
        $display("FAIL: %s CGA cost does not match reference", FUNC.name());
      end
      if (!close(to_real(co_cost), scaled(fb))) begin
        failures++;
        $display("FAIL: %s CoCGA cost does not match reference", FUNC.name());
      end
      $display("%-9s CGA: %7.0f machine cycles, best %g | CoCGA: %7.0f machine cycles, best %g | speedup %4.2f",
               FUNC.name(), cga_clocks / 4.0, fa, cocga_clocks / 4.0, fb,
               real'(cga_clocks) / real'(cocga_clocks));
      $display("%-9s time to best: CGA %7.0f, CoCGA %7.0f machine cycles",
               FUNC.name(), cga_best_at / 4.0, co_best_at / 4.0);
    end
  end
endmodule

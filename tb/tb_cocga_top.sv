// tb_cocga_top: end-to-end test of the CoCGA group at its default size
// (One-Max, 32-bit chromosome, two normal cells and one leader).
//
// Runs the search from reset until `done`, then checks:
//  - the reported best cost equals a reference One-Max cost of the reported
//    best chromosome (L minus its number of ones), and reaches the optimum 0;
//  - every generation of each cell takes four clocks (one machine cycle);
//  - the leader's BestPV holds only legal entries and its converged flag
//    agrees with them;
//  - the confident counters never decrease and the leader's registers hold
//    values the cells actually had;
//  - every mechanism of the design occurred: improvements (CC increments),
//    vectors accepted by the leader, vectors rejected (lower CC), a send
//    dropped because a broadcast arrived, broadcasts received by cells, and
//    convergence of both cells.
// A watchdog ends the run with a failure after 2,000,000 clocks.
module tb_cocga_top;
  import cocga_pkg::*;

  localparam int unsigned L = chrom_len(FN_ONEMAX);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          done;
  cost_t         best_cost;
  logic [L-1:0]  best_chrom;
  pv_t           best_pv [L];
  cc_t           cell_cc [2];
  cc_t           leader_cc [2];
  logic          leader_converged, accepted, rejected;
  leader_state_e leader_state;
  cell_state_e   cell_state [2];
  logic [1:0]    cell_mcycle, cell_done;

  int checks = 0, failures = 0;
  longint cyc = 0;

  cocga_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // event counters
  int n_inc [2], n_acc = 0, n_rej = 0, n_abort [2], n_recv [2], n_gen [2];
  int bad_mcycle = 0, cc_down = 0;
  longint last_gen [2];
  cc_t prev_cc [2];
  cell_state_e prev_state [2];

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (accepted) n_acc++;
      if (rejected) n_rej++;
      for (int c = 0; c < 2; c++) begin
        if (cell_cc[c] != prev_cc[c]) n_inc[c]++;
        if (cell_cc[c] < prev_cc[c]) cc_down++;
        if (cell_mcycle[c]) begin
          if (n_gen[c] > 0 && prev_state[c] == CS_UP && (cyc - last_gen[c]) != 4)
            bad_mcycle++;
          n_gen[c]++;
          last_gen[c] = cyc;
        end
        // a send that ends in RECV without having been received by the leader
        if (prev_state[c] == CS_SEND && cell_state[c] == CS_RECV) n_abort[c]++;
        if (prev_state[c] != CS_RECV && cell_state[c] == CS_RECV) n_recv[c]++;
        prev_cc[c]    = cell_cc[c];
        prev_state[c] = cell_state[c];
      end
    end
  end

  // Only count generation spacing for back-to-back generations: a cell
  // whose previous clock was CS_UP must start the next generation at once.
  initial begin
    for (int c = 0; c < 2; c++) begin
      n_inc[c] = 0; n_abort[c] = 0; n_recv[c] = 0; n_gen[c] = 0;
      last_gen[c] = 0; prev_cc[c] = '0; prev_state[c] = CS_GA;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done === 1'b1);
    repeat (2) @(posedge clk);
    begin
      automatic int ones = 0;
      automatic bit pv_conv = 1;
      for (int i = 0; i < L; i++) ones += int'(best_chrom[i]);
      check(best_cost == cost_t'(longint'(L) - longint'(ones)),
            "best cost matches reference One-Max cost");
      check(best_cost == 0, "One-Max optimum (all ones) found");
      for (int i = 0; i < L; i++)
        if (best_pv[i] != 8'd0 && best_pv[i] != 8'd255) pv_conv = 0;
      check(pv_conv == leader_converged, "leader converged flag agrees with BestPV");
      check(cell_done == 2'b11, "both cells converged");
      check(bad_mcycle == 0, "every generation took four clocks");
      check(cc_down == 0, "confident counters never decrease");
      for (int c = 0; c < 2; c++)
        check(leader_cc[c] <= cell_cc[c], "leader CC register holds a value the cell had");
    end
    $display("generations cell0=%0d cell1=%0d (machine cycles), clocks=%0d",
             n_gen[0], n_gen[1], cyc);
    $display("CC increments cell0=%0d cell1=%0d; leader accepted=%0d rejected=%0d",
             n_inc[0], n_inc[1], n_acc, n_rej);
    $display("dropped sends cell0=%0d cell1=%0d; broadcasts received cell0=%0d cell1=%0d",
             n_abort[0], n_abort[1], n_recv[0], n_recv[1]);
    $display("best cost=%0d chrom=%h", best_cost, best_chrom);
    check(n_inc[0] > 0 && n_inc[1] > 0, "mechanism: confident counter increment");
    check(n_acc > 0, "mechanism: leader accepted a vector");
    check(n_rej > 0, "mechanism: leader rejected a vector (lower CC)");
    check(n_abort[0] + n_abort[1] > 0, "mechanism: send dropped for a broadcast");
    check(n_recv[0] > 0 && n_recv[1] > 0, "mechanism: broadcast received by each cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, done never rose");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

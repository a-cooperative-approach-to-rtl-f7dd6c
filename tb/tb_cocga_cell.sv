// tb_cocga_cell: one normal cell (One-Max, 32 bits) against a model leader.
// Phase 1: the cell searches alone; the model takes its packages with a
//   randomly low ready line. Every vector received must equal the cell's
//   probability vector at that time, one vector per confident-counter
//   increment, and best_cost must match the best chromosome's reference
//   One-Max cost.
// Phase 2: the model broadcasts a random vector; the cell must load it
//   exactly.
// Phase 3: the model broadcasts an all-255 (converged) vector; the cell must
//   stop (done) with every entry still 255.
module tb_cocga_cell;
  import cocga_pkg::*;
  localparam int L = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic up_valid, up_ready = 0, dn_valid = 0, dn_ready, done, mcycle;
  pv_t up_data, dn_data = '0;
  cc_t cc;
  pv_t pv [L];
  cost_t best_cost;
  logic [L-1:0] best_chrom;
  cell_state_e state;
  int checks = 0, failures = 0;

  cocga_cell #(.FUNC(FN_ONEMAX), .CELL_ID(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- model leader: receive side ----
  pv_t rxv [L];
  int rx_cnt = 0, n_vec = 0, bad_vec = 0, n_gen = 0;
  always @(posedge clk) begin
    if (mcycle) n_gen++;
    if (up_valid && up_ready) begin
      rxv[rx_cnt] = up_data;
      rx_cnt++;
      if (rx_cnt == L) begin
        for (int i = 0; i < L; i++) if (rxv[i] != pv[i]) bad_vec++;
        rx_cnt = 0;
        n_vec++;
      end
    end
  end
  always @(negedge clk) up_ready <= ($urandom_range(0, 3) != 0);

  task automatic broadcast(input pv_t v [L]);
    for (int i = 0; i < L; i++) begin
      dn_valid = 1'b1;
      dn_data  = v[i];
      @(posedge clk);
      while (!dn_ready) @(posedge clk);
      #1;
    end
    dn_valid = 1'b0;
  endtask

  initial begin
    pv_t v [L];
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // phase 1
    repeat (3000) @(posedge clk);
    wait (state == CS_GA);
    @(negedge clk);
    check(n_vec > 0, "cell sent vectors after improvements");
    check(bad_vec == 0, "every vector sent equals the cell's PV");
    check(n_vec == int'(cc), $sformatf("one vector per CC increment (%0d vs %0d)", n_vec, cc));
    check(best_cost == cost_t'(L - $countones(best_chrom)), "best cost matches reference");
    check(n_gen > 500 && n_gen <= 750, $sformatf("about one generation per 4 clocks (%0d)", n_gen));
    // phase 2
    for (int i = 0; i < L; i++) v[i] = pv_t'($urandom_range(1, 254));
    fork
      broadcast(v);
    join
    wait (state != CS_RECV);
    #1;
    begin
      automatic int bad = 0;
      for (int i = 0; i < L; i++) if (pv[i] != v[i]) bad++;
      check(bad == 0, "broadcast vector loaded exactly");
    end
    // phase 3
    repeat (40) @(posedge clk);
    for (int i = 0; i < L; i++) v[i] = 8'd255;
    broadcast(v);
    repeat (20) @(posedge clk);
    check(done, "cell stops on a converged vector");
    begin
      automatic int bad = 0;
      for (int i = 0; i < L; i++) if (pv[i] != 8'd255) bad++;
      check(bad == 0, "converged vector kept");
    end
    $display("vectors sent=%0d cc=%0d best=%0d generations=%0d", n_vec, cc, best_cost, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_leader_cell: the group leader with two model neighbours.
// 1. neighbour 0 (cc 3 against 0) offers V0: accepted, BestPV = V0, both
//    neighbours receive V0;
// 2. neighbour 1 (cc 1 against 3) offers V1: taken but rejected, BestPV
//    stays V0 and nothing is broadcast;
// 3. neighbour 1 (cc 5) offers V2: accepted;
// 4. both offer at once with equal counts: served one after the other
//    (round robin), both accepted, the later one ends in BestPV;
// 5. a vector of only 0 and 255 sets `converged`.
// The CC registers must hold the counters sampled at each offer.
module tb_leader_cell;
  import cocga_pkg::*;
  localparam int L = 10;
  localparam int M = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic up_valid [M], up_ready [M], dn_valid [M], dn_ready [M];
  pv_t  up_data [M], dn_data [M];
  cc_t  cc_in [M], cc_reg [M];
  pv_t  best_pv [L];
  logic converged, accepted, rejected;
  leader_state_e state;
  int checks = 0, failures = 0;

  leader_cell #(.L(L), .M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // broadcast collectors
  pv_t bc [M][L];
  int  bc_cnt [M], bc_vecs [M];
  int  n_acc = 0, n_rej = 0;
  always @(posedge clk) begin
    if (accepted) n_acc++;
    if (rejected) n_rej++;
    for (int j = 0; j < M; j++) begin
      if (dn_valid[j] && dn_ready[j]) begin
        bc[j][bc_cnt[j]] = dn_data[j];
        bc_cnt[j]++;
        if (bc_cnt[j] == L) begin bc_cnt[j] = 0; bc_vecs[j]++; end
      end
    end
  end
  always @(negedge clk)
    for (int j = 0; j < M; j++) dn_ready[j] <= ($urandom_range(0, 2) != 0);

  task automatic offer(input int j, input pv_t v [L]);
    for (int i = 0; i < L; i++) begin
      up_valid[j] = 1'b1;
      up_data[j]  = v[i];
      @(posedge clk);
      while (!up_ready[j]) @(posedge clk);
      #1;
    end
    up_valid[j] = 1'b0;
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (state != LS_IDLE) @(posedge clk);
    #1;
  endtask

  function automatic bit same(input pv_t a [L], input pv_t b [L]);
    for (int i = 0; i < L; i++) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  initial begin
    pv_t v0 [L], v1 [L], v2 [L], v3 [L], v4 [L], vc [L], got [L];
    int v_before [M];
    for (int j = 0; j < M; j++) begin
      up_valid[j] = 0; up_data[j] = '0; cc_in[j] = '0; bc_cnt[j] = 0; bc_vecs[j] = 0;
    end
    for (int i = 0; i < L; i++) begin
      v0[i] = pv_t'($urandom_range(1, 254)); v1[i] = pv_t'($urandom_range(1, 254));
      v2[i] = pv_t'($urandom_range(1, 254)); v3[i] = pv_t'($urandom_range(1, 254));
      v4[i] = pv_t'($urandom_range(1, 254)); vc[i] = (i % 3 == 0) ? 8'd0 : 8'd255;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < L; i++) got[i] = best_pv[i];
    check(got[0] == 8'd128 && got[L-1] == 8'd128 && !converged, "BestPV starts at 0.5");
    // 1
    cc_in[0] = 5'd3;
    offer(0, v0);
    wait_idle();
    got = best_pv;
    check(same(got, v0), "step 1: BestPV = V0");
    check(n_acc == 1 && n_rej == 0, "step 1: accepted");
    check(same(bc[0], v0) && same(bc[1], v0) && bc_vecs[0] == 1 && bc_vecs[1] == 1,
          "step 1: V0 broadcast to both");
    check(cc_reg[0] == 3 && cc_reg[1] == 0, "step 1: CC registers");
    // 2
    cc_in[1] = 5'd1;
    offer(1, v1);
    wait_idle();
    got = best_pv;
    check(same(got, v0), "step 2: BestPV unchanged");
    check(n_acc == 1 && n_rej == 1, "step 2: rejected");
    check(bc_vecs[0] == 1 && bc_vecs[1] == 1, "step 2: no broadcast after a reject");
    // 3
    cc_in[1] = 5'd5;
    offer(1, v2);
    wait_idle();
    got = best_pv;
    check(same(got, v2) && n_acc == 2, "step 3: BestPV = V2");
    check(same(bc[0], v2), "step 3: V2 broadcast");
    // 4
    cc_in[0] = 5'd6; cc_in[1] = 5'd6;
    v_before[0] = bc_vecs[0];
    fork
      offer(0, v3);
      offer(1, v4);
    join
    wait_idle();
    got = best_pv;
    check(n_acc == 4, "step 4: both accepted");
    check(same(got, v4), "step 4: later vector kept");
    check(bc_vecs[0] - v_before[0] == 2, "step 4: two broadcasts");
    check(cc_reg[0] == 6 && cc_reg[1] == 6, "step 4: CC registers");
    // 5
    cc_in[0] = 5'd9;
    offer(0, vc);
    wait_idle();
    check(converged, "step 5: converged flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

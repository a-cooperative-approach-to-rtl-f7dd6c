// cocga_top: a cooperative compact GA group of two normal cells and one
// group leader, the configuration the paper builds and measures.
//
// Each normal cell runs its own compact GA on the chosen benchmark (FUNC).
// When a cell's tournament winner beats that cell's best fitness, its 5-bit
// confident counter is incremented and its probability vector is sent to
// the leader as L 8-bit packages. The leader keeps the vector of the
// neighbour whose confident counter is highest and sends that vector back
// to both cells, which continue from it. The search ends when both cells'
// vectors have converged (every entry 0 or 255) and no transfer is pending.
//
// Ports: `done` rises at the end of the search and stays high. `best_cost`
// / `best_chrom` are the best individual either cell has evaluated (cost:
// smaller is better, scaled as described in fev). `best_pv` is the leader's
// BestPV; `cell_cc` the two confident counters and `leader_cc` the leader's
// copies of them, taken when it last served a vector. The remaining outputs
// expose events for observation: accepted / rejected vectors at the leader,
// each cell's state and a pulse per generation (a machine cycle of four
// clocks). Reset is asynchronous, active low; the search starts when it is
// released.
module cocga_top
  import cocga_pkg::*;
#(
  parameter func_e       FUNC = FN_ONEMAX,
  parameter int unsigned L    = chrom_len(FUNC)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          done,
  output cost_t         best_cost,
  output logic [L-1:0]  best_chrom,
  output pv_t           best_pv [L],
  output cc_t           cell_cc [2],
  output cc_t           leader_cc [2],
  output logic          leader_converged,
  output logic          accepted,
  output logic          rejected,
  output leader_state_e leader_state,
  output cell_state_e   cell_state [2],
  output logic [1:0]    cell_mcycle,
  output logic [1:0]    cell_done
);

  localparam int unsigned M = 2;

  logic  up_valid [M];
  pv_t   up_data  [M];
  logic  up_ready [M];
  logic  dn_valid [M];
  pv_t   dn_data  [M];
  logic  dn_ready [M];
  cost_t cell_best_cost  [M];
  logic [L-1:0] cell_best_chrom [M];

  for (genvar c = 0; c < M; c++) begin : g_cell
    pv_t cell_pv [L];
    cocga_cell #(.FUNC(FUNC), .L(L), .CELL_ID(c)) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .up_valid  (up_valid[c]),
      .up_data   (up_data[c]),
      .up_ready  (up_ready[c]),
      .dn_valid  (dn_valid[c]),
      .dn_data   (dn_data[c]),
      .dn_ready  (dn_ready[c]),
      .cc        (cell_cc[c]),
      .pv        (cell_pv),
      .done      (cell_done[c]),
      .best_cost (cell_best_cost[c]),
      .best_chrom(cell_best_chrom[c]),
      .state     (cell_state[c]),
      .mcycle    (cell_mcycle[c])
    );
  end

  leader_cell #(.L(L), .M(M)) u_leader (
    .clk      (clk),
    .rst_n    (rst_n),
    .up_valid (up_valid),
    .up_data  (up_data),
    .up_ready (up_ready),
    .cc_in    (cell_cc),
    .dn_valid (dn_valid),
    .dn_data  (dn_data),
    .dn_ready (dn_ready),
    .best_pv  (best_pv),
    .cc_reg   (leader_cc),
    .converged(leader_converged),
    .state    (leader_state),
    .accepted (accepted),
    .rejected (rejected)
  );

  assign done = (&cell_done) && (leader_state == LS_IDLE)
                && !dn_valid[0] && !dn_valid[1] && !up_valid[0] && !up_valid[1];

  always_comb begin
    if (cell_best_cost[1] < cell_best_cost[0]) begin
      best_cost  = cell_best_cost[1];
      best_chrom = cell_best_chrom[1];
    end else begin
      best_cost  = cell_best_cost[0];
      best_chrom = cell_best_chrom[0];
    end
  end

endmodule

// cocga_cell: a normal CoCGA cell, one compact GA that cooperates with a
// group leader.
//
// L bit modules (probability vector, random sources, generators, update
// logic) form the chromosome; two fitness evaluators (FEV_A, FEV_B) and the
// comparator (CMP) run the tournament; the confident counter (CC) counts
// how often the tournament winner improved on the cell's best fitness; the
// COMM unit sends the probability vector to the leader after each
// improvement and loads the leader's best vector when the leader sends one;
// fsm_main_ctrl sequences all of it. This is the structure of the
// paper's block diagram. With up_ready tied high and dn_valid tied low
// the cell is the plain compact GA (each improvement then costs L idle
// clocks for a send that goes nowhere).
//
// Link to the leader: up_* carries this cell's PV to the leader (valid /
// ready, one 8-bit package per clock, entry 0 first); dn_* brings the
// leader's best PV; `cc` is the confident counter, a plain 5-bit wire.
// Timing: one generation takes four clocks; a send or receive pauses the GA
// for about L clocks. `mcycle` pulses once per generation.
module cocga_cell
  import cocga_pkg::*;
#(
  parameter func_e       FUNC    = FN_ONEMAX,
  parameter int unsigned L       = chrom_len(FUNC),
  parameter int unsigned CELL_ID = 0,
  parameter int unsigned IDX_W   = (L > 1) ? $clog2(L) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // to the leader
  output logic         up_valid,
  output pv_t          up_data,
  input  logic         up_ready,
  // from the leader
  input  logic         dn_valid,
  input  pv_t          dn_data,
  output logic         dn_ready,
  output cc_t          cc,
  // status
  output pv_t          pv [L],
  output logic         done,
  output cost_t        best_cost,
  output logic [L-1:0] best_chrom,
  output cell_state_e  state,
  output logic         mcycle
);

  logic ga, gb, eval, up_pv, inc, tx_start, tx_abort, rx_en;
  logic a_wins, improved;
  logic [L-1:0] chrom_a, chrom_b, conv;
  cost_t cost_a, cost_b;
  logic tx_busy, tx_started, tx_done, wr_en, rx_done;
  logic [IDX_W-1:0] tx_idx, wr_idx;
  pv_t wr_data;

  for (genvar i = 0; i < L; i++) begin : g_bit
    cga_bit_module #(.SEED(rng_seed(CELL_ID, i))) u_bit (
      .clk      (clk),
      .rst_n    (rst_n),
      .ga       (ga),
      .gb       (gb),
      .up_pv    (up_pv),
      .a_wins   (a_wins),
      .load     (wr_en && (wr_idx == IDX_W'(i))),
      .load_pv  (wr_data),
      .pv       (pv[i]),
      .a        (chrom_a[i]),
      .b        (chrom_b[i]),
      .converged(conv[i])
    );
  end

  fev #(.FUNC(FUNC), .L(L)) u_fev_a (.chrom(chrom_a), .cost(cost_a));
  fev #(.FUNC(FUNC), .L(L)) u_fev_b (.chrom(chrom_b), .cost(cost_b));

  cmp #(.L(L)) u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .eval      (eval),
    .cost_a    (cost_a),
    .cost_b    (cost_b),
    .chrom_a   (chrom_a),
    .chrom_b   (chrom_b),
    .a_wins    (a_wins),
    .improved  (improved),
    .best_cost (best_cost),
    .best_chrom(best_chrom)
  );

  cc_counter u_cc (.clk(clk), .rst_n(rst_n), .inc(inc), .cc(cc));

  comm #(.L(L)) u_comm (
    .clk       (clk),
    .rst_n     (rst_n),
    .tx_start  (tx_start),
    .tx_abort  (tx_abort),
    .tx_busy   (tx_busy),
    .tx_started(tx_started),
    .tx_done   (tx_done),
    .tx_idx    (tx_idx),
    .tx_rdata  (pv[tx_idx]),
    .tx_valid  (up_valid),
    .tx_data   (up_data),
    .tx_ready  (up_ready),
    .rx_en     (rx_en),
    .rx_valid  (dn_valid),
    .rx_data   (dn_data),
    .rx_ready  (dn_ready),
    .wr_en     (wr_en),
    .wr_idx    (wr_idx),
    .wr_data   (wr_data),
    .rx_done   (rx_done)
  );

  fsm_main_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .converged (&conv),
    .improved  (improved),
    .rx_valid  (dn_valid),
    .tx_busy   (tx_busy),
    .tx_started(tx_started),
    .rx_done   (rx_done),
    .ga        (ga),
    .gb        (gb),
    .eval      (eval),
    .up_pv     (up_pv),
    .inc       (inc),
    .tx_start  (tx_start),
    .tx_abort  (tx_abort),
    .rx_en     (rx_en),
    .done      (done),
    .state     (state)
  );

  assign mcycle = ga;

endmodule

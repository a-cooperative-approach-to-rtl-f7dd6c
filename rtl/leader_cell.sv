// leader_cell: the group leader of a CoCGA group.
//
// The leader runs no GA of its own. It holds the group's best probability
// vector (BestPV), one confident-counter register per neighbour (CC #1,
// CC #2), one COMM unit per neighbour, and a main controller. As in the
// paper's leader pseudocode:
//   1. a neighbour that improved its best fitness offers its PV (its COMM
//      raises up_valid), which tells the leader that its confident counter
//      has changed;
//   2. the leader samples every neighbour's confident counter into the CC
//      registers and finds the highest;
//   3. it receives the offered PV and, if that neighbour's counter is the
//      highest (ties go to the sender), copies it into BestPV; otherwise
//      the packages are taken and dropped and BestPV keeps the vector of
//      the neighbour that last held the highest count;
//   4. when BestPV has been replaced, it sends BestPV to every neighbour,
//      all in parallel ("Update new updated pl to all normal Cell"); after
//      a dropped offer nothing is sent, since BestPV has not changed.
// Several offers are served one at a time, round robin. Because the leader
// stores only one vector, the offered PV is the one that is received; the
// paper's "copy the vector of the neighbour with the highest cc" is
// followed exactly when the sender holds the highest count. Handshakes,
// arbitration and the keep-on-reject rule are this design's choices.
//
// Timing: a transaction is L clocks of receive plus, after an accept, L or
// more clocks of broadcast (each neighbour takes packages once it has
// finished its current generation). `accepted`/`rejected` pulse once per received vector.
module leader_cell
  import cocga_pkg::*;
#(
  parameter int unsigned L     = 32,
  parameter int unsigned M     = 2,
  parameter int unsigned IDX_W = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned SEL_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the neighbours
  input  logic          up_valid [M],
  input  pv_t           up_data  [M],
  output logic          up_ready [M],
  input  cc_t           cc_in    [M],
  // to the neighbours
  output logic          dn_valid [M],
  output pv_t           dn_data  [M],
  input  logic          dn_ready [M],
  // status
  output pv_t           best_pv  [L],
  output cc_t           cc_reg   [M],
  output logic          converged,
  output leader_state_e state,
  output logic          accepted,
  output logic          rejected
);

  logic [M-1:0]     tx_busy, rx_done, wr_en, req;
  logic [IDX_W-1:0] tx_idx [M];
  logic [IDX_W-1:0] wr_idx [M];
  pv_t              wr_data [M];
  logic             bcast_start;
  logic [SEL_W-1:0] sel, last_sel, pick;
  logic             pick_ok;
  logic             accept_q;
  logic             cc_top;

  for (genvar j = 0; j < M; j++) begin : g_comm
    assign req[j] = up_valid[j];
    comm #(.L(L)) u_comm (
      .clk       (clk),
      .rst_n     (rst_n),
      .tx_start  (bcast_start),
      .tx_abort  (1'b0),
      .tx_busy   (tx_busy[j]),
      .tx_started(),
      .tx_done   (),
      .tx_idx    (tx_idx[j]),
      .tx_rdata  (best_pv[tx_idx[j]]),
      .tx_valid  (dn_valid[j]),
      .tx_data   (dn_data[j]),
      .tx_ready  (dn_ready[j]),
      .rx_en     ((state == LS_RECV) && (sel == SEL_W'(j))),
      .rx_valid  (up_valid[j]),
      .rx_data   (up_data[j]),
      .rx_ready  (up_ready[j]),
      .wr_en     (wr_en[j]),
      .wr_idx    (wr_idx[j]),
      .wr_data   (wr_data[j]),
      .rx_done   (rx_done[j])
    );
  end

  // Round-robin pick among requesting neighbours, starting after last_sel.
  always_comb begin
    pick    = last_sel;
    pick_ok = 1'b0;
    for (int k = 1; k <= M; k++) begin
      if (!pick_ok && req[(int'(last_sel) + k) % int'(M)]) begin
        pick    = SEL_W'((int'(last_sel) + k) % int'(M));
        pick_ok = 1'b1;
      end
    end
  end

  // Is the picked neighbour's current counter the highest of the group?
  always_comb begin
    cc_top = 1'b1;
    for (int j = 0; j < M; j++) begin
      if (cc_in[j] > cc_in[pick]) cc_top = 1'b0;
    end
  end

  // ---------------- main controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= LS_IDLE;
      sel      <= '0;
      last_sel <= SEL_W'(M - 1);
      accept_q <= 1'b0;
      for (int j = 0; j < M; j++) cc_reg[j] <= '0;
    end else begin
      unique case (state)
        LS_IDLE: begin
          if (pick_ok) begin
            sel      <= pick;
            last_sel <= pick;
            accept_q <= cc_top;
            for (int j = 0; j < M; j++) cc_reg[j] <= cc_in[j];
            state    <= LS_RECV;
          end
        end
        LS_RECV: begin
          if (rx_done[sel]) state <= accept_q ? LS_BCAST : LS_IDLE;
        end
        LS_BCAST: begin
          // the COMM units start in the first BCAST clock; wait for all
          if (!bcast_start && (tx_busy == '0)) state <= LS_IDLE;
        end
        default: state <= LS_IDLE;
      endcase
    end
  end

  // start the broadcast in the clock after the receive completes
  logic in_bcast_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_bcast_q <= 1'b0;
    else        in_bcast_q <= (state == LS_BCAST);
  end
  assign bcast_start = (state == LS_BCAST) && !in_bcast_q;

  assign accepted = (state == LS_RECV) && rx_done[sel] &&  accept_q;
  assign rejected = (state == LS_RECV) && rx_done[sel] && !accept_q;

  // ---------------- BestPV register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) best_pv[i] <= PV_INIT;
    end else if ((state == LS_RECV) && accept_q && wr_en[sel]) begin
      best_pv[wr_idx[sel]] <= wr_data[sel];
    end
  end

  always_comb begin
    converged = 1'b1;
    for (int i = 0; i < L; i++) begin
      if ((best_pv[i] != '0) && (best_pv[i] != PV_MAX)) converged = 1'b0;
    end
  end

  // Only the selected neighbour may deliver packages.
  for (genvar j = 0; j < M; j++) begin : g_chk
    a_one_sender: assert property (@(posedge clk) disable iff (!rst_n)
      wr_en[j] |-> (state == LS_RECV && sel == SEL_W'(j)));
  end

endmodule

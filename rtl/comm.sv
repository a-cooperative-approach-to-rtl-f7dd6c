// comm: the COMM unit that moves a probability vector as 8-bit packages.
//
// A vector of L entries travels as L packages of 8 bits, entry 0 first, as
// the paper describes (N packages for an N-bit chromosome). One COMM
// sits in each normal cell and two in the group leader, one per neighbour.
// The link is full duplex: an outgoing channel (tx_*) and an incoming
// channel (rx_*), each a valid/ready handshake with one package per clock
// at most. The paper draws one bidirectional 8-bit path; splitting it
// into two one-way channels with valid/ready is this design's choice.
//
// Sending: `tx_start` (one clock, while idle) begins; the unit presents
// entry `tx_idx` (read combinationally by the owner as `tx_rdata`) with
// tx_valid, moves on when tx_ready is seen, and pulses `tx_done` in the
// clock the last package is taken. `tx_abort` drops a send before its first
// package has been taken (`tx_started` low); it is ignored afterwards.
// Receiving: while `rx_en` is high the unit is ready; each package taken is
// passed on as `wr_en`/`wr_idx`/`wr_data`, and `rx_done` marks the last one.
module comm
  import cocga_pkg::*;
#(
  parameter int unsigned L     = 32,
  parameter int unsigned IDX_W = (L > 1) ? $clog2(L) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // send side
  input  logic             tx_start,
  input  logic             tx_abort,
  output logic             tx_busy,
  output logic             tx_started,
  output logic             tx_done,
  output logic [IDX_W-1:0] tx_idx,
  input  pv_t              tx_rdata,
  output logic             tx_valid,
  output pv_t              tx_data,
  input  logic             tx_ready,
  // receive side
  input  logic             rx_en,
  input  logic             rx_valid,
  input  pv_t              rx_data,
  output logic             rx_ready,
  output logic             wr_en,
  output logic [IDX_W-1:0] wr_idx,
  output pv_t              wr_data,
  output logic             rx_done
);

  localparam logic [IDX_W-1:0] LAST = IDX_W'(L - 1);

  logic             tx_active;
  logic [IDX_W-1:0] rx_idx;
  logic             tx_fire;

  // ---------------- send FSM ----------------
  assign tx_fire    = tx_valid && tx_ready;
  assign tx_valid   = tx_active;
  assign tx_data    = tx_rdata;
  assign tx_busy    = tx_active;
  assign tx_started = tx_active && (tx_idx != '0);
  assign tx_done    = tx_fire && (tx_idx == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_active <= 1'b0;
      tx_idx    <= '0;
    end else if (!tx_active) begin
      tx_idx <= '0;
      if (tx_start) tx_active <= 1'b1;
    end else if (tx_abort && (tx_idx == '0) && !tx_fire) begin
      tx_active <= 1'b0;
    end else if (tx_fire) begin
      if (tx_idx == LAST) begin
        tx_active <= 1'b0;
        tx_idx    <= '0;
      end else begin
        tx_idx <= tx_idx + 1'b1;
      end
    end
  end

  // ---------------- receive FSM ----------------
  assign rx_ready = rx_en;
  assign wr_en    = rx_valid && rx_ready;
  assign wr_idx   = rx_idx;
  assign wr_data  = rx_data;
  assign rx_done  = wr_en && (rx_idx == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rx_idx <= '0;
    else if (wr_en)   rx_idx <= (rx_idx == LAST) ? '0 : rx_idx + 1'b1;
  end

  // A package offered must stay offered, unchanged, until it is taken
  // (an abort may only withdraw the first package).
  property p_tx_hold;
    @(posedge clk) disable iff (!rst_n)
      (tx_valid && !tx_ready && tx_idx != '0) |=> (tx_valid && $stable(tx_idx));
  endproperty
  a_tx_hold: assert property (p_tx_hold);

endmodule

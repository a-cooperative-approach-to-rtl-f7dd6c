// fsm_main_ctrl: controller of a normal CoCGA cell (FSM_MAIN_CTRL).
//
// Sequences the bit modules, comparator, confident counter and COMM unit.
// A generation of the compact GA is one machine cycle of four clocks, as
// the paper counts them (one machine cycle = four clock cycles):
//   CS_GA   ga    : generate individual a (first checks convergence: if
//                   every PV entry is 0 or 255 the cell goes to CS_DONE)
//   CS_GB   gb    : generate individual b
//   CS_EVAL eval  : fitness of a and b, tournament, best-fitness check
//   CS_UP   up_pv : update the PV; inc when the winner beat the best
// After an improvement (step 4 of the paper's cell pseudocode) the cell
// enters CS_SEND and the COMM unit sends its PV to the leader; the
// confident counter itself is a continuous 5-bit wire. A package arriving
// from the leader (rx_valid) is served in CS_RECV, which loads the leader's
// best PV into the bit modules;
// it is checked for at the end of a machine cycle, while waiting in
// CS_DONE, and while a send waits for its first package to be taken (the
// send is then dropped, since the PV it would carry is being replaced).
// The GA is paused while a vector is sent or received. The order of these
// checks and the pause are this design's choices; the paper gives only
// the pseudocode steps. Reset starts the cell in CS_GA.
module fsm_main_ctrl
  import cocga_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        converged,
  input  logic        improved,
  input  logic        rx_valid,
  input  logic        tx_busy,
  input  logic        tx_started,
  input  logic        rx_done,
  output logic        ga,
  output logic        gb,
  output logic        eval,
  output logic        up_pv,
  output logic        inc,
  output logic        tx_start,
  output logic        tx_abort,
  output logic        rx_en,
  output logic        done,
  output cell_state_e state
);

  cell_state_e state_d;

  always_comb begin
    state_d  = state;
    ga       = 1'b0;
    gb       = 1'b0;
    eval     = 1'b0;
    up_pv    = 1'b0;
    inc      = 1'b0;
    tx_start = 1'b0;
    tx_abort = 1'b0;
    rx_en    = 1'b0;
    unique case (state)
      CS_GA: begin
        if (converged) state_d = CS_DONE;
        else begin
          ga      = 1'b1;
          state_d = CS_GB;
        end
      end
      CS_GB: begin
        gb      = 1'b1;
        state_d = CS_EVAL;
      end
      CS_EVAL: begin
        eval    = 1'b1;
        state_d = CS_UP;
      end
      CS_UP: begin
        up_pv = 1'b1;
        inc   = improved;
        if (improved) begin
          tx_start = 1'b1;
          state_d  = CS_SEND;
        end else if (rx_valid) begin
          state_d = CS_RECV;
        end else begin
          state_d = CS_GA;
        end
      end
      CS_SEND: begin
        tx_abort = rx_valid && !tx_started;
        if (!tx_busy) state_d = rx_valid ? CS_RECV : CS_GA;
      end
      CS_RECV: begin
        rx_en = 1'b1;
        if (rx_done) state_d = CS_GA;
      end
      CS_DONE: begin
        if (rx_valid) state_d = CS_RECV;
      end
      default: state_d = CS_GA;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= CS_GA;
    else        state <= state_d;
  end

  assign done = (state == CS_DONE);

  // At most one phase strobe per clock, and a send and a receive never
  // overlap.
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ga, gb, eval, up_pv}));
  a_no_send_and_receive: assert property (@(posedge clk) disable iff (!rst_n)
    !(rx_en && (tx_start || state == CS_SEND)));

endmodule

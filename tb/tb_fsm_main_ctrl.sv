// tb_fsm_main_ctrl: the normal cell's controller.
// Checks the four-clock generation (ga, gb, eval, up_pv one clock each, in
// that order), INC and the start of a send after an improvement, the return
// to generation when the send ends, the drop of a send that has not begun
// when the leader starts a broadcast, the receive of a broadcast at the end
// of a generation, the convergence stop and the wake-up from it.
module tb_fsm_main_ctrl;
  import cocga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic converged = 0, improved = 0, rx_valid = 0, tx_busy = 0, tx_started = 0, rx_done = 0;
  logic ga, gb, eval, up_pv, inc, tx_start, tx_abort, rx_en, done;
  cell_state_e state;
  int checks = 0, failures = 0;

  fsm_main_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, state.name()); end
  endtask

  // one plain generation; checks each clock's strobes
  task automatic generation(input bit imp);
    check(ga && !gb && !eval && !up_pv, "clock 1: ga");
    @(negedge clk);
    check(gb && !ga && !eval && !up_pv, "clock 2: gb");
    @(negedge clk);
    check(eval && !ga && !gb && !up_pv, "clock 3: eval");
    improved = imp;
    @(negedge clk);
    check(up_pv && inc == imp && tx_start == imp, "clock 4: up_pv, inc on improvement");
    @(negedge clk);
    improved = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5; n++) generation(0);
    check(state == CS_GA, "back to GA after a generation");
    // improvement -> send
    generation(1);
    check(state == CS_SEND && !ga, "send after improvement, GA paused");
    tx_busy = 1; tx_started = 1;
    repeat (3) begin
      @(negedge clk);
      check(state == CS_SEND, "stays in send while busy");
    end
    tx_busy = 0; tx_started = 0;
    @(negedge clk);
    check(state == CS_GA, "GA resumes after send");
    // improvement, then a broadcast arrives before the send begins
    generation(1);
    tx_busy = 1;
    rx_valid = 1;
    #1 check(tx_abort, "send dropped when the leader broadcasts first");
    @(negedge clk);
    tx_busy = 0;
    @(negedge clk);
    check(state == CS_RECV && rx_en, "receive after dropped send");
    rx_done = 1;
    @(negedge clk);
    rx_done = 0; rx_valid = 0;
    check(state == CS_GA, "GA after receive");
    // broadcast arriving during a generation is served at its end
    rx_valid = 1;
    generation(0);
    check(state == CS_RECV && rx_en, "receive at the end of the generation");
    rx_done = 1;
    @(negedge clk);
    rx_done = 0; rx_valid = 0;
    // convergence
    converged = 1;
    #1 check(!ga, "no generation once converged");
    @(negedge clk);
    check(done && state == CS_DONE, "done when converged");
    repeat (3) @(negedge clk);
    check(done, "stays done");
    rx_valid = 1;
    @(negedge clk);
    check(state == CS_RECV, "wakes up for a broadcast");
    converged = 0;
    rx_done = 1;
    @(negedge clk);
    rx_done = 0; rx_valid = 0;
    generation(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

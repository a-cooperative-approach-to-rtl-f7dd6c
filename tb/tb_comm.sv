// tb_comm: the package link unit.
// Send side: a vector of L random entries is sent against a ready line that
// is randomly low; the packages must arrive in order, one per accepted
// handshake, with tx_done on the last and the unit idle afterwards. An
// abort before the first package is taken must withdraw the send.
// Receive side: packages offered with random gaps must be passed on with
// increasing wr_idx and rx_done on the last; nothing is taken while rx_en
// is low.
module tb_comm;
  import cocga_pkg::*;
  localparam int L = 12;
  localparam int IW = $clog2(L);
  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_start = 0, tx_abort = 0, tx_busy, tx_started, tx_done, tx_valid, tx_ready = 0;
  logic [IW-1:0] tx_idx, wr_idx;
  pv_t tx_rdata, tx_data, rx_data = '0, wr_data;
  logic rx_en = 0, rx_valid = 0, rx_ready, wr_en, rx_done;
  pv_t mem [L];
  int checks = 0, failures = 0;

  comm #(.L(L)) dut (.*);
  always #5 clk = ~clk;
  assign tx_rdata = mem[tx_idx];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int got, dones;
    pv_t rx_ref [L];
    for (int i = 0; i < L; i++) mem[i] = pv_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!tx_valid && !tx_busy, "idle after reset");
    // ---- send with random back-pressure, twice ----
    for (int rep = 0; rep < 2; rep++) begin
      tx_start = 1'b1;
      @(negedge clk);
      tx_start = 1'b0;
      got = 0; dones = 0;
      for (int cyc = 0; cyc < 200 && got < L; cyc++) begin
        tx_ready = ($urandom_range(0, 2) != 0);
        #1;
        if (tx_valid && tx_ready) begin
          check(tx_data == mem[got], $sformatf("package %0d", got));
          if (tx_done) dones++;
          check(tx_done == (got == L - 1), "tx_done only on the last package");
          got++;
        end
        @(negedge clk);
      end
      tx_ready = 1'b0;
      check(got == L, "all packages sent");
      check(dones == 1, "one tx_done");
      check(!tx_busy && !tx_valid, "idle after send");
    end
    // ---- abort before the first package ----
    tx_start = 1'b1;
    @(negedge clk);
    tx_start = 1'b0;
    check(tx_valid && !tx_started, "offering first package");
    tx_abort = 1'b1;
    @(negedge clk);
    tx_abort = 1'b0;
    check(!tx_valid && !tx_busy, "abort withdraws the send");
    // ---- receive ----
    for (int i = 0; i < L; i++) rx_ref[i] = pv_t'($urandom);
    rx_valid = 1'b1; rx_data = rx_ref[0];
    @(negedge clk);
    check(!wr_en && !rx_ready, "nothing taken while rx_en low");
    rx_en = 1'b1;
    got = 0;
    for (int cyc = 0; cyc < 200 && got < L; cyc++) begin
      rx_valid = ($urandom_range(0, 3) != 0);
      rx_data  = rx_ref[got];
      #1;
      if (rx_valid) begin
        check(wr_en && int'(wr_idx) == got && wr_data == rx_ref[got], $sformatf("rx package %0d", got));
        check(rx_done == (got == L - 1), "rx_done only on the last package");
        got++;
      end else begin
        check(!wr_en, "no write without valid");
      end
      @(negedge clk);
    end
    rx_valid = 1'b0; rx_en = 1'b0;
    check(got == L, "all packages received");
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

// tb_cc_counter: the confident counter counts INC pulses, ignores clocks
// without INC, starts at zero after reset and saturates at 31.
module tb_cc_counter;
  import cocga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, inc = 1'b0;
  cc_t cc;
  int checks = 0, failures = 0;
  int model = 0;

  cc_counter dut (.clk(clk), .rst_n(rst_n), .inc(inc), .cc(cc));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(cc == 0, "reset value 0");
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      inc = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (inc && model < 31) model++;
      @(negedge clk);
      check(int'(cc) == model, $sformatf("count after step %0d: %0d vs %0d", n, cc, model));
    end
    check(model == 31, "saturation reached in the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cga_vs_cocga: the paper's speed comparison of a plain compact GA with
// the cooperative one, for One-Max (32 bits), F1, F2 (30 bits) and F3
// (50 bits). Each pair runs from the same reset; each run's best cost is
// checked against a reference, and the time to the end of the search is
// printed in machine cycles (four clocks) with the resulting speedup. The
// speedup itself is reported, not checked: it depends on the random
// sources and on the population size, which the paper does not give.
module tb_cga_vs_cocga;
  import cocga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   d [4];
  longint ca [4], co [4];
  int     ch [4], fl [4];

  cga_vs_cocga_pair #(.FUNC(FN_ONEMAX)) p0 (.clk(clk), .rst_n(rst_n), .both_done(d[0]),
    .cga_clocks(ca[0]), .cocga_clocks(co[0]), .checks(ch[0]), .failures(fl[0]));
  cga_vs_cocga_pair #(.FUNC(FN_F1)) p1 (.clk(clk), .rst_n(rst_n), .both_done(d[1]),
    .cga_clocks(ca[1]), .cocga_clocks(co[1]), .checks(ch[1]), .failures(fl[1]));
  cga_vs_cocga_pair #(.FUNC(FN_F2)) p2 (.clk(clk), .rst_n(rst_n), .both_done(d[2]),
    .cga_clocks(ca[2]), .cocga_clocks(co[2]), .checks(ch[2]), .failures(fl[2]));
  cga_vs_cocga_pair #(.FUNC(FN_F3)) p3 (.clk(clk), .rst_n(rst_n), .both_done(d[3]),
    .cga_clocks(ca[3]), .cocga_clocks(co[3]), .checks(ch[3]), .failures(fl[3]));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3]);
    repeat (3) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += ch[i];
      failures += fl[i];
      checks++;
      if (ch[i] != 2) begin
        failures++;
        $display("FAIL: pair %0d did not check", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule

// tb_cga_bit_module: one probability-vector bit.
// Checks the reset value (128), loading, the +1/-1 update toward the
// winner's bit only when a and b differ, saturation at 0 and 255, the
// converged flag, that entries 0 and 255 generate constant bits, and that
// an entry of 64 generates ones about a quarter of the time for a and b.
module tb_cga_bit_module;
  import cocga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ga = 0, gb = 0, up_pv = 0, a_wins = 0, load = 0;
  pv_t  load_pv = '0, pv;
  logic a, b, converged;
  int checks = 0, failures = 0;

  cga_bit_module #(.SEED(16'h3A71)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic sig);
    sig = 1'b1;
    @(negedge clk);
    sig = 1'b0;
  endtask

  task automatic set_pv(input pv_t v);
    load_pv = v;
    pulse(load);
  endtask

  // force a and b to given values by generating from a certain PV
  task automatic set_ab(input logic va, input logic vb);
    set_pv(va ? 8'd255 : 8'd0);
    pulse(ga);
    set_pv(vb ? 8'd255 : 8'd0);
    pulse(gb);
  endtask

  task automatic try_update(input logic va, input logic vb, input logic aw,
                            input pv_t start, input pv_t expect_pv, input string what);
    set_ab(va, vb);
    set_pv(start);
    a_wins = aw;
    pulse(up_pv);
    check(pv == expect_pv, $sformatf("%s: pv=%0d expected %0d", what, pv, expect_pv));
  endtask

  initial begin
    int ones_a, ones_b;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(pv == 8'd128, "reset value 128 (probability 0.5)");
    check(!converged, "not converged at reset");
    rst_n = 1'b1;
    @(negedge clk);
    set_pv(8'd77);
    check(pv == 8'd77, "load");
    try_update(1, 0, 1, 8'd100, 8'd101, "a=1 wins");
    try_update(1, 0, 0, 8'd100, 8'd99,  "b=0 wins");
    try_update(0, 1, 1, 8'd100, 8'd99,  "a=0 wins");
    try_update(0, 1, 0, 8'd100, 8'd101, "b=1 wins");
    try_update(1, 1, 1, 8'd100, 8'd100, "a==b no change");
    try_update(0, 0, 0, 8'd100, 8'd100, "a==b=0 no change");
    try_update(1, 0, 1, 8'd255, 8'd255, "saturate at 255");
    try_update(0, 1, 1, 8'd0,   8'd0,   "saturate at 0");
    try_update(0, 1, 1, 8'd1,   8'd0,   "reach 0");
    check(converged, "converged at 0");
    set_pv(8'd255);
    check(converged, "converged at 255");
    set_pv(8'd254);
    check(!converged, "254 not converged");
    // constant generation at the ends
    set_pv(8'd255);
    for (int n = 0; n < 50; n++) begin
      pulse(ga); pulse(gb);
      check(a && b, "entry 255 always generates 1");
    end
    set_pv(8'd0);
    for (int n = 0; n < 50; n++) begin
      pulse(ga); pulse(gb);
      check(!a && !b, "entry 0 always generates 0");
    end
    // statistics at 64/256
    set_pv(8'd64);
    ones_a = 0; ones_b = 0;
    for (int n = 0; n < 2000; n++) begin
      pulse(ga); pulse(gb);
      ones_a += int'(a); ones_b += int'(b);
    end
    check(ones_a > 400 && ones_a < 600, $sformatf("a ones %0d of 2000 near 500", ones_a));
    check(ones_b > 400 && ones_b < 600, $sformatf("b ones %0d of 2000 near 500", ones_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

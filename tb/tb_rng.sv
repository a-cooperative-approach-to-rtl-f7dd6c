// tb_rng: checks the bit module's random source against a reference LFSR
// stepped one bit at a time (x^16 + x^14 + x^13 + x^11 + 1, eight steps per
// clock), checks that `en` low holds the value, that the state never
// reaches zero, and that the 8-bit outputs are roughly uniform.
module tb_rng;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] rnd;
  int checks = 0, failures = 0;
  localparam logic [15:0] SEED = 16'h1D2C;

  rng #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .en(en), .rnd(rnd));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: Fibonacci-free single-step Galois shift, tap mask 0xB400
  function automatic logic [15:0] step1(logic [15:0] s);
    logic lsb;
    lsb = s[0];
    s = {1'b0, s[15:1]};
    if (lsb) begin
      s[15] = ~s[15]; s[13] = ~s[13]; s[12] = ~s[12]; s[10] = ~s[10];
    end
    return s;
  endfunction

  initial begin
    logic [15:0] ref_s;
    longint sum;
    int hist [4];
    ref_s = SEED;
    sum = 0;
    for (int q = 0; q < 4; q++) hist[q] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(rnd == SEED[7:0], "reset loads the seed");
    @(negedge clk);
    check(rnd == SEED[7:0], "en low holds the state");
    en = 1'b1;
    for (int n = 0; n < 4096; n++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) ref_s = step1(ref_s);

      check(rnd == ref_s[7:0], "sequence continues");
      sum += rnd;
      hist[rnd[7:6]]++;
    end
    check(sum / 4096 > 118 && sum / 4096 < 137, "mean near 127.5");
    for (int q = 0; q < 4; q++)
      check(hist[q] > 850 && hist[q] < 1200, "each quarter of the range used evenly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rng: pseudo-random number source of one bit module.
//
// A 16-bit Galois LFSR (x^16 + x^14 + x^13 + x^11 + 1, maximal length) is
// advanced eight steps every clock, so every clock yields eight bits that
// share nothing with the previous clock's output. The bit module samples
// `rnd` once for individual a and, one clock later, once for individual b.
// The paper only names an 8-bit RNG inside each bit module; the LFSR,
// its polynomial and the leap of eight steps are this design's choice.
// SEED must be non-zero; each bit module of each cell gets its own seed.
//
// Interface: `en` advances the generator; `rnd` is the current 8-bit value.
// Reset loads SEED.
module rng #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [7:0] rnd
);

  logic [15:0] state_q, state_d;

  always_comb begin
    state_d = state_q;
    for (int k = 0; k < 8; k++) begin
      state_d = state_d[0] ? ((state_d >> 1) ^ 16'hB400) : (state_d >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state_q <= (SEED == 16'h0) ? 16'h1 : SEED;
    else if (en) state_q <= state_d;
  end

  assign rnd = state_q[7:0];

endmodule

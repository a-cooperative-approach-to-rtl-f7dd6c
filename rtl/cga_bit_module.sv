// cga_bit_module: one bit of a compact-GA chromosome.
//
// Holds one 8-bit probability-vector entry (PV) together with its own random
// number source (RNG) and the generators of bit i of the two competing
// individuals (GEN_A, GEN_B), plus the update logic (UPDATE PV), as in the
// bit module of the paper. Modules of this kind are placed side by side,
// one per chromosome bit.
//
// Control lines (from the cell controller), one clock each:
//   ga     : a <= (rnd < pv), i.e. bit = 1 with probability pv/256
//   gb     : b <= (rnd < pv), using the next random value
//   up_pv  : if a != b, move pv one step toward the winner's bit
//            (+1 if the winner's bit is 1, -1 otherwise), saturating at 0 and 255
//   load   : pv <= load_pv (a package received from the leader)
// `a_wins` is the comparator's UPDATE_PV result: 1 if individual a won.
//
// Design choices not fixed by the paper: the step is one count (1/N with
// N = 256), the entry 255 is treated as probability 1.0 so that a converged
// entry stays converged, reset sets pv to 128 (0.5) and a, b to 0.
module cga_bit_module
  import cocga_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ga,
  input  logic gb,
  input  logic up_pv,
  input  logic a_wins,
  input  logic load,
  input  pv_t  load_pv,
  output pv_t  pv,
  output logic a,
  output logic b,
  output logic converged
);

  logic [7:0] rnd;
  logic       gen_bit;

  rng #(.SEED(SEED)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (1'b1),
    .rnd  (rnd)
  );

  // 255 counts as certainty so that a converged entry generates only ones.
  assign gen_bit   = (rnd < pv) || (pv == PV_MAX);
  assign converged = (pv == '0) || (pv == PV_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= 1'b0;
      b <= 1'b0;
    end else begin
      if (ga) a <= gen_bit;
      if (gb) b <= gen_bit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv <= PV_INIT;
    end else if (load) begin
      pv <= load_pv;
    end else if (up_pv && (a != b)) begin
      // winner's bit is a when a wins, else b
      if ((a_wins ? a : b) == 1'b1) begin
        if (pv != PV_MAX) pv <= pv + 1'b1;
      end else begin
        if (pv != '0) pv <= pv - 1'b1;
      end
    end
  end

endmodule

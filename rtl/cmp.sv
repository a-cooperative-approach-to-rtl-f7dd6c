// cmp: tournament between the two individuals (CMP) and best-so-far record.
//
// On `eval` (one clock, the evaluation phase of a machine cycle) it
// registers `a_wins` (1 when cost_a <= cost_b, ties go to a) for the
// following update phase, and compares the winner's cost with the best cost
// seen so far by the cell. If the winner is strictly better, the best cost
// and the best chromosome are replaced and `improved` is set for the update
// phase, where the controller turns it into the confident counter's INC.
// `improved` and `a_wins` hold until the next `eval`.
// The tournament is the paper's; the tie rule, keeping the best
// chromosome here and resetting the best cost to all ones (worst) are this
// design's choices.
module cmp
  import cocga_pkg::*;
#(
  parameter int unsigned L = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         eval,
  input  cost_t        cost_a,
  input  cost_t        cost_b,
  input  logic [L-1:0] chrom_a,
  input  logic [L-1:0] chrom_b,
  output logic         a_wins,
  output logic         improved,
  output cost_t        best_cost,
  output logic [L-1:0] best_chrom
);

  logic         win_a;
  cost_t        win_cost;
  logic [L-1:0] win_chrom;

  assign win_a     = (cost_a <= cost_b);
  assign win_cost  = win_a ? cost_a : cost_b;
  assign win_chrom = win_a ? chrom_a : chrom_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_wins     <= 1'b0;
      improved   <= 1'b0;
      best_cost  <= '1;
      best_chrom <= '0;
    end else if (eval) begin
      a_wins   <= win_a;
      improved <= (win_cost < best_cost);
      if (win_cost < best_cost) begin
        best_cost  <= win_cost;
        best_chrom <= win_chrom;
      end
    end
  end

endmodule

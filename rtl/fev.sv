// fev: fitness evaluation of one chromosome (FEV_A / FEV_B).
//
// Combinational. Returns a cost, smaller is better, for the benchmark FUNC:
//   FN_ONEMAX : cost = L - (number of ones)                 (L = 32)
//   FN_F1     : three 10-bit fields r, x = (r - 512)/100 in [-5.12, 5.11];
//               cost = sum (r - 512)^2 = 10^4 * F1
//   FN_F2     : two 15-bit fields r, x = (r - 16384)/8000 in [-2.048, 2.048);
//               with X = r - 16384,
//               cost = 100*(X1^2 - 8000*X2)^2 + 8000^2*(8000 - X1)^2
//                    = 8000^4 * F2
//   FN_F3     : five 10-bit fields r, x = (r - 512)/100;
//               cost = sum floor((r + 88)/100) = F3 + 30, in [0, 55]
// Field k occupies chromosome bits [k*W +: W], as an unsigned number.
// The functions and the chromosome lengths are the paper's; the field
// encodings, the integer scaling and the +30 offset of F3 are this design's
// choices (the scalings are exact, so the cost orders chromosomes exactly as
// the real-valued function does).
module fev
  import cocga_pkg::*;
#(
  parameter func_e       FUNC = FN_ONEMAX,
  parameter int unsigned L    = chrom_len(FUNC)
) (
  input  logic [L-1:0] chrom,
  output cost_t        cost
);

  if (FUNC == FN_ONEMAX) begin : g_onemax
    always_comb begin
      cost = cost_t'(L);
      for (int i = 0; i < L; i++) cost = cost - cost_t'(chrom[i]);
    end
  end else if (FUNC == FN_F1) begin : g_f1
    always_comb begin
      logic signed [23:0] xs;
      logic signed [23:0] sq;
      cost = '0;
      for (int k = 0; k < 3; k++) begin
        xs   = $signed({14'd0, chrom[k*10 +: 10]}) - 24'sd512;
        sq   = xs * xs;
        cost = cost + cost_t'(sq);
      end
    end
  end else if (FUNC == FN_F2) begin : g_f2
    always_comb begin
      logic signed [79:0] x1, x2, d1, d2, t;
      x1   = $signed({65'd0, chrom[14:0]})  - 80'sd16384;
      x2   = $signed({65'd0, chrom[29:15]}) - 80'sd16384;
      d1   = x1 * x1 - 80'sd8000 * x2;
      d2   = 80'sd8000 - x1;
      t    = 80'sd100 * d1 * d1 + 80'sd64000000 * d2 * d2;
      cost = t[FIT_W-1:0];
    end
  end else begin : g_f3
    always_comb begin
      cost = '0;
      for (int k = 0; k < 5; k++) begin
        cost = cost + cost_t'((11'(chrom[k*10 +: 10]) + 11'd88) / 11'd100);
      end
    end
  end

  // The chromosome must hold every field of the chosen function.
  initial begin
    assert (L >= chrom_len(FUNC))
      else $error("fev: L=%0d is shorter than %0d", L, chrom_len(FUNC));
  end

endmodule

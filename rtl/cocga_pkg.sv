// cocga_pkg: types and constants shared by the cooperative compact GA
// (CoCGA) hardware.
//
// The probability-vector entry width (8 bits) and the confident-counter
// width (5 bits) are the published values. The fitness width, the benchmark
// selector and the chromosome lengths per benchmark (32 bits for One-Max,
// 30 for De Jong F1 and F2, 50 for F3) are used by every cell. All fitness
// evaluators return a cost where smaller is better, so one comparator
// serves every benchmark.
package cocga_pkg;

  // Width of one probability-vector entry and of one COMM package.
  localparam int unsigned PV_W = 8;
  // Largest entry value; it stands for probability 1.0.
  localparam logic [PV_W-1:0] PV_MAX = '1;
  // Reset value: the mid-point, probability 0.5.
  localparam logic [PV_W-1:0] PV_INIT = 8'd128;
  // Confident counter width.
  localparam int unsigned CC_W = 5;
  // Cost width: wide enough for the scaled De Jong F2 cost (< 2^65).
  localparam int unsigned FIT_W = 72;

  typedef logic [PV_W-1:0]  pv_t;
  typedef logic [CC_W-1:0]  cc_t;
  typedef logic [FIT_W-1:0] cost_t;

  // Benchmark problem computed by the fitness evaluators.
  typedef enum logic [1:0] {
    FN_ONEMAX = 2'd0,
    FN_F1     = 2'd1,
    FN_F2     = 2'd2,
    FN_F3     = 2'd3
  } func_e;

  // Chromosome length used for each benchmark.
  function automatic int unsigned chrom_len(func_e f);
    case (f)
      FN_ONEMAX: return 32;
      FN_F1:     return 30;
      FN_F2:     return 30;
      default:   return 50;
    endcase
  endfunction

  // Seed of the random number source of bit `b` of cell `c`: a simple
  // multiplicative hash, forced non-zero (an LFSR must not start at zero).
  function automatic logic [15:0] rng_seed(int unsigned c, int unsigned b);
    logic [31:0] h;
    h = (c + 1) * 32'h9E3779B1 ^ (b + 1) * 32'h85EBCA6B;
    h = h ^ (h >> 15);
    return (h[15:0] == 16'h0) ? 16'h1 : h[15:0];
  endfunction

  // Phases of one machine cycle of a normal cell (four clocks).
  typedef enum logic [2:0] {
    CS_GA   = 3'd0,  // generate individual a
    CS_GB   = 3'd1,  // generate individual b
    CS_EVAL = 3'd2,  // evaluate and compare a and b
    CS_UP   = 3'd3,  // update the probability vector, bump CC
    CS_SEND = 3'd4,  // send PV to the leader
    CS_RECV = 3'd5,  // receive the leader's best PV
    CS_DONE = 3'd6   // converged, waiting
  } cell_state_e;

  // States of the leader's main controller.
  typedef enum logic [1:0] {
    LS_IDLE  = 2'd0,
    LS_RECV  = 2'd1,
    LS_BCAST = 2'd2
  } leader_state_e;

endpackage

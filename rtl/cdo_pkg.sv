// cdo_pkg: types and constants shared by the CDO pricing cores.
//
// Probabilities are unsigned fixed point with FRAC_W fractional bits and one
// integer bit, so that 1.0 (a certain outcome, such as the empty pool) is
// exact. The 24 fractional bits follow the FIFO-based core's precision; the
// single integer bit is this design's choice. Losses (notionals) are scaled
// integers of NOTIONAL_W bits; the all-ones value marks the end of a loss
// distribution inside the convolution FIFOs ("FFFF", hence 16 bits).
//
// Host words are 32 bits wide, the width of the point-to-point links that feed
// the cores. The opcode layout below is this design's own:
//   [31:29] opcode
//   [28]    flag: last instrument of a scenario (OP_PROB) or last scenario of
//           a time step (OP_WEIGHT)
//   [28:24] tranche index (OP_ATTACH, OP_SIZE)
//   [24:0]  probability or weight, Q1.24 (OP_PROB, OP_WEIGHT)
//   [15:0]  notional or tranche point (OP_NOTIONAL, OP_ATTACH, OP_SIZE)
package cdo_pkg;

  parameter int unsigned NOTIONAL_W = 16;
  parameter int unsigned FRAC_W     = 24;
  parameter int unsigned PROB_W     = FRAC_W + 1;
  // Tranche loss of one scenario: notional integer bits plus FRAC_W fraction.
  parameter int unsigned LOSS_W     = 48;
  // Weighted sum over scenarios, sent to the host as two 32-bit words.
  parameter int unsigned TOTAL_W    = 64;
  parameter int unsigned WORD_W     = 32;

  typedef logic [NOTIONAL_W-1:0] notional_t;
  typedef logic [PROB_W-1:0]     prob_t;
  typedef logic [LOSS_W-1:0]     loss_t;
  typedef logic [TOTAL_W-1:0]    total_t;
  typedef logic [WORD_W-1:0]     word_t;

  localparam notional_t END_MARK = '1;
  localparam prob_t     PROB_ONE = prob_t'(1) << FRAC_W;

  // One point of a loss distribution: a pool loss and its probability.
  typedef struct packed {
    notional_t notional;
    prob_t     prob;
  } point_t;

  // One instrument as handed to the convolution: its notional N_k, its
  // default probability pi_k, and whether it is the last of the pool.
  typedef struct packed {
    notional_t notional;
    prob_t     pd;
    logic      last;
  } instr_t;

  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,
    OP_ATTACH   = 3'd1,
    OP_SIZE     = 3'd2,
    OP_WEIGHT   = 3'd3,
    OP_NOTIONAL = 3'd4,
    OP_PROB     = 3'd5
  } opcode_t;

  // One-cycle event pulses a core reports, for monitoring and test.
  typedef struct packed {
    logic starved;     // convolution waiting for the next instrument
    logic case_a;      // output point from the no-default branch only
    logic case_b;      // output point from both branches
    logic case_c;      // output point from the default branch only
    logic dropped;     // output point discarded (probability rounded to 0)
    logic scen_done;   // a scenario's tranche losses were accumulated
    logic step_done;   // a time step's results were written out
    logic overflow;    // a convolution FIFO was written while full
  } core_events_t;

  function automatic word_t make_word(opcode_t op, logic flag, logic [4:0] idx,
                                      logic [24:0] val);
    word_t w;
    w = '0;
    w[31:29] = op;
    w[24:0]  = val;
    if (op == OP_ATTACH || op == OP_SIZE) w[28:24] = idx;
    else                                  w[28]    = flag;
    return w;
  endfunction

endpackage

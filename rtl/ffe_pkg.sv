// ffe_pkg - shared word formats, sizes and types of the fault-tolerant
// adaptive feed-forward equalizer (FFE).
//
// Number formats (all two's complement, one sample per clock):
//   x[n]   8 bits, Q2.6  (value = x / 64, range [-2, 2))
//   h_i    10 bits, Q2.8 (value = h / 256, range [-2, 2)), taken from the
//          top 10 bits of a 30-bit adaptation accumulator
//   y, e   Q.14 (value = y / 16384); the symbol levels +1 and -1 are
//          +/-16384 in this scale
// The widths 8 / 10 / 30 bits, the 20 taps split into two blocks of 10,
// and alpha = 2^-12 (training) / 2^-16 (steady state) follow the equalizer
// case study this design implements. The binary-point positions are this
// design's own choice.
package ffe_pkg;

  // ---- sizes --------------------------------------------------------------
  parameter int unsigned XW          = 8;    // input sample width
  parameter int unsigned XF          = 6;    // input fraction bits
  parameter int unsigned COEF_W      = 10;   // coefficient width
  parameter int unsigned COEF_F      = 8;    // coefficient fraction bits
  parameter int unsigned ACC_W       = 30;   // adaptation accumulator width
  parameter int unsigned BLOCK_TAPS  = 10;   // taps per sub-FFE (FFE_1, FFE_2)

  // Width of one sub-FFE output: product plus growth of the adder chain.
  parameter int unsigned YB_W = COEF_W + XW + $clog2(BLOCK_TAPS);
  // Width of the slicer error (sum of two blocks, minus a symbol level).
  parameter int unsigned E_W  = YB_W + 2;
  // Fraction bits of y and e.
  parameter int unsigned YF   = COEF_F + XF;

  // ---- adaptation speed ----------------------------------------------------
  parameter int unsigned ALPHA_TRAIN_EXP  = 12;  // alpha = 2^-12 in training
  parameter int unsigned ALPHA_STEADY_EXP = 16;  // alpha = 2^-16 in steady state

  // ---- fault detection -----------------------------------------------------
  // Failure threshold on |e|, in units of 2^-14: 320 / 16384 = 0.0195,
  // a little more than twice the largest steady-state error (about 0.009)
  // that these word widths leave.
  parameter int unsigned FAIL_THRESH  = 320;
  // Consecutive below-threshold samples that clear the failure counter.
  parameter int unsigned QUIET_CYCLES = 64;
  // Failure-counter value that declares a permanent failure (2^17 cycles,
  // well above the length of one training phase).
  parameter int unsigned FAIL_LIMIT   = 131072;
  // Length of a training (high-alpha) phase in samples.
  parameter int unsigned ADAPT_CYCLES = 35000;

  // ---- configuration of the two sub-FFEs ----------------------------------
  typedef enum logic [1:0] {
    CFG_BOTH   = 2'd0,   // FFE_1 and FFE_2 in cascade, 20 taps
    CFG_FIRST  = 2'd1,   // FFE_1 alone, FFE_2 disabled
    CFG_SECOND = 2'd2    // FFE_2 alone, fed directly with x[n]
  } ffe_cfg_e;

  // ---- recuperation state --------------------------------------------------
  typedef enum logic [1:0] {
    ST_NORMAL = 2'd0,    // both blocks in use
    ST_TRY1   = 2'd1,    // first attempt: FFE_1 only
    ST_TRY2   = 2'd2,    // second attempt: FFE_2 only
    ST_FAILED = 2'd3     // both attempts failed: fail signal raised
  } ctrl_state_e;

endpackage

// trellis_pkg: constants shared by the trellis state metric RTL and the
// voltage-overscaling timing model.
//
// Word lengths and trellis sizes are those of the two test vehicles: a
// rate-1/2, 128-state convolutional code decoded by a Viterbi decoder with
// 8-bit state metrics and 3-bit branch metrics, and a rate-1/3, 8-state Turbo
// code decoded by Max-Log-MAP with 9-bit state metrics and 8-bit branch
// metrics. The gate delays are the unit-delay model used to study timing
// errors (half adder 1/1, full adder carry 1 and sum 2, carry-only adder and
// mux 1, flip-flop clock-to-Q 2, zero setup and hold). The clock delays are
// the importance-aware skew schedule: one delay per ACS output flip-flop,
// bits 0..7 being the state metric (LSB first) and bit 8 the decision bit
// for Viterbi, bits 0..8 the 9-bit state metric for Max-Log-MAP.
package trellis_pkg;
  timeunit 1ns;
  timeprecision 1ps;


  // Viterbi test vehicle
  localparam int unsigned VIT_STATES = 128;
  localparam int unsigned VIT_SM_W   = 8;
  localparam int unsigned VIT_BM_W   = 3;

  // Max-Log-MAP test vehicle
  localparam int unsigned MLM_STATES = 8;
  localparam int unsigned MLM_SM_W   = 9;
  localparam int unsigned MLM_BM_W   = 8;

  // Unit gate delays (in units of one half-adder delay)
  localparam real D_HA_C  = 1.0;
  localparam real D_HA_S  = 1.0;
  localparam real D_FA_C  = 1.0;
  localparam real D_FA_S  = 2.0;
  localparam real D_CA    = 1.0;
  localparam real D_MUX   = 1.0;
  localparam real D_CLK_Q = 2.0;

  // Clock delay of each ACS output flip-flop, in the same units
  localparam real VIT_SKEW [9] = '{0.0000, 1.0253, 1.6983, 2.2456, 2.7651,
                                  3.2791, 3.7917, 4.3043, 3.2604};
  localparam real MLM_SKEW [9] = '{0.0000, 1.0252, 1.7926, 2.3548, 2.8812,
                                  3.3964, 3.9104, 4.4232, 4.6796};

  // Importance factor of each ACS output bit (same bit order as above);
  // values printed as "~0" or "~1" are given as 0.0 and 1.0.
  localparam real VIT_IMPORTANCE [9] = '{0.0000, 0.7165, 0.9401, 0.9885, 0.9981,
                                        1.0000, 1.0000, 1.0000, 0.9998};
  localparam real MLM_IMPORTANCE [9] = '{0.0000, 0.6141, 0.9192, 0.9786, 0.9951,
                                        0.9981, 0.9998, 1.0000, 1.0000};

endpackage

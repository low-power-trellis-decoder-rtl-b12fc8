// acs_unit: add-compare-select unit of a trellis state metric recursion,
// built from 1-bit cells in the ripple-carry arrangement of the Viterbi ACS.
//
// How it works. Two ripple-carry adders form the candidate metrics
// pa = sm0 + bm0 and pb = sm1 + bm1 (modulo 2^SM_W; the branch metric is
// unsigned and zero-extended, so bits below BM_W use full adders and the
// upper bits half adders). A comparator forms pa - pb = pa + ~pb + 1 with a
// chain of carry-only adders (carry-in tied to 1) and one full adder in the
// MSB position, whose sum bit is the sign of the modular difference:
// dif = 1 when pa < pb in modulo (two's complement) comparison. This sign bit
// selects the survivor in a 2:1 mux and is also the decision bit. Because the
// comparison is modular, the metrics may wrap around freely as long as the
// spread between any two state metrics stays below 2^(SM_W-1).
//
// Selection rule: with SELECT_MAX = 0 (Viterbi, metrics are distances) the
// smaller candidate survives; with SELECT_MAX = 1 (Max-Log-MAP, metrics are
// log-likelihoods) the larger one does. Ties go to pb when SELECT_MAX = 0 and
// to pa when SELECT_MAX = 1, as the sign bit of a zero difference is 0.
//
// Interface and timing. One new state metric per clock: sm_q and dec_q are
// the D-FF outputs, valid one cycle after sm0/sm1/bm0/bm1. dec_q = 1 means the
// comparator's sign bit was set (pa < pb), so with SELECT_MAX = 0 the path
// through sm0 survived. The decision flip-flop exists only when
// HAS_DECISION = 1 (Viterbi); otherwise dec_q is held at 0. A synchronous
// init loads init_sm and clears the decision bit.
//
// Follows the source design: the adder, carry-only comparator, mux and D-FF
// structure, the word lengths (8-bit metric / 3-bit branch metric for Viterbi,
// 9 / 8 for Max-Log-MAP) and the decision bit taken from the comparator MSB.
// This design's own choices: the init port, the min/max selection parameter,
// the tie rule and the zero carry-in of the LSB adders.
module acs_unit #(
  parameter int unsigned SM_W         = 8,
  parameter int unsigned BM_W         = 3,
  parameter bit          HAS_DECISION = 1'b1,
  parameter bit          SELECT_MAX   = 1'b0
) (
  input  logic            clk,
  input  logic            init,
  input  logic [SM_W-1:0] init_sm,
  input  logic [SM_W-1:0] sm0,
  input  logic [BM_W-1:0] bm0,
  input  logic [SM_W-1:0] sm1,
  input  logic [BM_W-1:0] bm1,
  output logic [SM_W-1:0] sm_q,
  output logic            dec_q
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [SM_W-1:0] pa, pb;        // candidate metrics
  logic [SM_W:0]   ca_c, cb_c;    // adder carries
  logic [SM_W-1:0] cmp_c;         // comparator carries
  logic            dif;           // sign of pa - pb
  logic            pick_a;
  logic [SM_W-1:0] sm_d;

  assign ca_c[0] = 1'b0;
  assign cb_c[0] = 1'b0;

  for (genvar i = 0; i < SM_W; i++) begin : g_add
    if (i < BM_W) begin : g_fa
      fa_cell u_fa_a (.a(sm0[i]), .b(bm0[i]), .ci(ca_c[i]), .s(pa[i]), .co(ca_c[i+1]));
      fa_cell u_fa_b (.a(sm1[i]), .b(bm1[i]), .ci(cb_c[i]), .s(pb[i]), .co(cb_c[i+1]));
    end else begin : g_ha
      ha_cell u_ha_a (.a(sm0[i]), .b(ca_c[i]), .s(pa[i]), .co(ca_c[i+1]));
      ha_cell u_ha_b (.a(sm1[i]), .b(cb_c[i]), .s(pb[i]), .co(cb_c[i+1]));
    end
  end

  // Comparator: pa + ~pb + 1, only the MSB sum is kept.
  assign cmp_c[0] = 1'b1;
  for (genvar i = 0; i < SM_W - 1; i++) begin : g_cmp
    ca_cell u_ca (.a(pa[i]), .b(~pb[i]), .ci(cmp_c[i]), .co(cmp_c[i+1]));
  end
  logic cmp_co_unused;
  fa_cell u_cmp_msb (.a(pa[SM_W-1]), .b(~pb[SM_W-1]), .ci(cmp_c[SM_W-1]),
                     .s(dif), .co(cmp_co_unused));

  assign pick_a = dif ^ SELECT_MAX;
  assign sm_d   = pick_a ? pa : pb;

  always_ff @(posedge clk) begin
    if (init) sm_q <= init_sm;
    else      sm_q <= sm_d;
  end

  if (HAS_DECISION) begin : g_dec
    always_ff @(posedge clk) begin
      if (init) dec_q <= 1'b0;
      else      dec_q <= dif;
    end
  end else begin : g_nodec
    assign dec_q = 1'b0;
  end

  // Upper adder carries and the comparator carry-out are not used: metrics
  // are kept modulo 2^SM_W.
  logic unused_carries;
  assign unused_carries = ^{ca_c[SM_W], cb_c[SM_W], cmp_co_unused};

  initial begin
    assert (BM_W >= 1 && BM_W <= SM_W)
      else $error("acs_unit: BM_W must be between 1 and SM_W");
  end

endmodule

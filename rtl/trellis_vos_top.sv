// trellis_vos_top: the trellis state metric datapaths of the two decoders
// used to study voltage overscaling (VOS), side by side.
//
//   u_vit   - Viterbi decoder of a rate-1/2, 128-state convolutional code:
//             128 ACS units, 8-bit state metrics, 3-bit branch metrics,
//             minimum selection, one decision bit per state per step.
//   u_alpha - Max-Log-MAP decoder of a rate-1/3, 8-state Turbo code, forward
//             recursion: 8 ACS units, 9-bit metrics, 8-bit branch metrics,
//             maximum selection, no decision bits.
//   u_beta  - the same for the backward recursion.
//
// The two decoders share nothing but the clock; each has its own init,
// branch metric and state metric ports. Branch metrics come from branch
// metric units outside this block (for Max-Log-MAP already normalized so the
// 9-bit modular state metrics cannot overflow); Viterbi decisions go to a
// survivor memory outside this block, and the alpha/beta metrics to the
// log-likelihood stage of the Max-Log-MAP decoder.
//
// Timing: every unit performs one trellis step per clock with one cycle of
// latency (see trellis_smu). In silicon the ACS output flip-flops are
// meant to be clocked with the per-bit importance-aware clock delays held in
// trellis_pkg (VIT_SKEW, MLM_SKEW), so that the supply can be scaled below
// the critical voltage while errors land mostly in the low-order metric bits.
// That skew is a clock-tree property, not logic, and is therefore absent from
// the synthesizable RTL. For simulation, VOS_MODEL = 1 builds all three
// units from acs_vos_model, which carries the gate delays and the skew, so
// the decoders can be run at an overscaled supply (VOS_DELAY_SCALE > 1).
module trellis_vos_top
  import trellis_pkg::*;
#(
  // Simulation only (see trellis_smu): use the ACS timing models, with all
  // gate delays scaled by VOS_DELAY_SCALE, and clock the ACS flip-flops with
  // the skew schedule (VOS_SKEW = 1) or with no skew (VOS_SKEW = 0).
  parameter bit  VOS_MODEL       = 1'b0,
  parameter real VOS_DELAY_SCALE = 1.0,
  parameter bit  VOS_SKEW        = 1'b1
) (
  input  logic                clk,

  // Viterbi state metric unit
  input  logic                vit_init,
  input  logic [VIT_SM_W-1:0] vit_init_sm [VIT_STATES],
  input  logic [VIT_BM_W-1:0] vit_bm0     [VIT_STATES],
  input  logic [VIT_BM_W-1:0] vit_bm1     [VIT_STATES],
  output logic [VIT_SM_W-1:0] vit_sm      [VIT_STATES],
  output logic                vit_dec     [VIT_STATES],

  // Max-Log-MAP forward (alpha) state metric unit
  input  logic                alpha_init,
  input  logic [MLM_SM_W-1:0] alpha_init_sm [MLM_STATES],
  input  logic [MLM_BM_W-1:0] alpha_bm0     [MLM_STATES],
  input  logic [MLM_BM_W-1:0] alpha_bm1     [MLM_STATES],
  output logic [MLM_SM_W-1:0] alpha_sm      [MLM_STATES],

  // Max-Log-MAP backward (beta) state metric unit
  input  logic                beta_init,
  input  logic [MLM_SM_W-1:0] beta_init_sm [MLM_STATES],
  input  logic [MLM_BM_W-1:0] beta_bm0     [MLM_STATES],
  input  logic [MLM_BM_W-1:0] beta_bm1     [MLM_STATES],
  output logic [MLM_SM_W-1:0] beta_sm      [MLM_STATES]
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam real NO_SKEW [9] = '{default: 0.0};

  trellis_smu #(
    .N_STATES(VIT_STATES), .SM_W(VIT_SM_W), .BM_W(VIT_BM_W),
    .HAS_DECISION(1'b1), .SELECT_MAX(1'b0), .BACKWARD(1'b0),
    .TIMING_MODEL(VOS_MODEL), .DELAY_SCALE(VOS_DELAY_SCALE),
    .SKEW(VOS_SKEW ? VIT_SKEW : NO_SKEW)
  ) u_vit (
    .clk(clk), .init(vit_init), .init_sm(vit_init_sm),
    .bm0(vit_bm0), .bm1(vit_bm1), .sm_q(vit_sm), .dec_q(vit_dec)
  );

  // Max-Log-MAP units have no decision flip-flops; their dec_q is constant.
  logic alpha_dec_unused [MLM_STATES];
  logic beta_dec_unused  [MLM_STATES];

  trellis_smu #(
    .N_STATES(MLM_STATES), .SM_W(MLM_SM_W), .BM_W(MLM_BM_W),
    .HAS_DECISION(1'b0), .SELECT_MAX(1'b1), .BACKWARD(1'b0),
    .TIMING_MODEL(VOS_MODEL), .DELAY_SCALE(VOS_DELAY_SCALE),
    .SKEW(VOS_SKEW ? MLM_SKEW : NO_SKEW)
  ) u_alpha (
    .clk(clk), .init(alpha_init), .init_sm(alpha_init_sm),
    .bm0(alpha_bm0), .bm1(alpha_bm1), .sm_q(alpha_sm), .dec_q(alpha_dec_unused)
  );

  trellis_smu #(
    .N_STATES(MLM_STATES), .SM_W(MLM_SM_W), .BM_W(MLM_BM_W),
    .HAS_DECISION(1'b0), .SELECT_MAX(1'b1), .BACKWARD(1'b1),
    .TIMING_MODEL(VOS_MODEL), .DELAY_SCALE(VOS_DELAY_SCALE),
    .SKEW(VOS_SKEW ? MLM_SKEW : NO_SKEW)
  ) u_beta (
    .clk(clk), .init(beta_init), .init_sm(beta_init_sm),
    .bm0(beta_bm0), .bm1(beta_bm1), .sm_q(beta_sm), .dec_q(beta_dec_unused)
  );

endmodule

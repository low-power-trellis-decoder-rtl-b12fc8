// trellis_smu: trellis state metric unit, one ACS unit per trellis state,
// all updating in parallel once per clock (one trellis step per cycle).
//
// How it works. The trellis is the shift-register trellis of a code with
// memory m = log2(N_STATES): in the forward direction the state after input u
// is ((s << 1) | u) mod N_STATES, so state j is reached from
// p0 = j >> 1 and p1 = (j >> 1) + N_STATES/2. This connectivity is the same
// for every generator polynomial and for recursive codes; the code itself
// only decides which branch metric belongs to which transition, and that
// mapping is left to the branch metric unit that drives bm0/bm1.
//   BACKWARD = 0: sm[j] <= ACS(sm[p0] + bm0[j], sm[p1] + bm1[j])
//                 (Viterbi path metrics, Max-Log-MAP alpha recursion);
//                 bm0[j]/bm1[j] belong to the transitions p0->j / p1->j.
//   BACKWARD = 1: sm[i] <= ACS(sm[n0] + bm0[i], sm[n1] + bm1[i]) with
//                 n0 = 2i mod N, n1 = (2i+1) mod N
//                 (Max-Log-MAP beta recursion); bm0[i]/bm1[i] belong to
//                 the transitions i->n0 / i->n1.
// No metric normalization is done here: the ACS units compare modulo
// 2^SM_W, and the branch metric unit keeps the metric spread below
// 2^(SM_W-1) (for Max-Log-MAP by normalizing the branch metrics).
//
// Interface and timing. init loads init_sm into every state in one cycle.
// Each following cycle consumes one set of branch metrics; sm_q/dec_q show
// the metrics and decisions of that step on the next cycle. dec_q[j] = 1
// means the candidate through p0 (or n0) had the smaller metric.
//
// Timing simulation. With TIMING_MODEL = 1 (never for synthesis) every ACS
// unit is replaced by acs_vos_model, whose gate delays are multiplied by
// DELAY_SCALE and whose output flip-flops are clocked with the delays in
// SKEW. The unit then behaves as the gate-level circuit would at an
// overscaled supply, including its timing errors, for decoder-level
// experiments. TIMING_MODEL = 0 (default) gives the synthesizable RTL and
// ignores DELAY_SCALE and SKEW.
//
// Follows the source design: one identical ACS unit per state, 128 states
// with 8/3-bit metrics for Viterbi and 8 states with 9/8-bit metrics for
// Max-Log-MAP, decision bits for Viterbi only, normalization moved out of
// the recursion. This design's own choices: the state numbering, the
// per-transition branch metric ports and the init port.
module trellis_smu
  import trellis_pkg::*;
#(
  parameter int unsigned N_STATES     = 128,
  parameter int unsigned SM_W         = 8,
  parameter int unsigned BM_W         = 3,
  parameter bit          HAS_DECISION = 1'b1,
  parameter bit          SELECT_MAX   = 1'b0,
  parameter bit          BACKWARD     = 1'b0,
  // Simulation only: build the unit from ACS timing models instead
  parameter bit          TIMING_MODEL = 1'b0,
  parameter real         DELAY_SCALE  = 1.0,
  parameter real         SKEW [SM_W + 32'(HAS_DECISION)] = VIT_SKEW
) (
  input  logic            clk,
  input  logic            init,
  input  logic [SM_W-1:0] init_sm [N_STATES],
  input  logic [BM_W-1:0] bm0     [N_STATES],
  input  logic [BM_W-1:0] bm1     [N_STATES],
  output logic [SM_W-1:0] sm_q    [N_STATES],
  output logic            dec_q   [N_STATES]
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned HALF = N_STATES / 2;

  for (genvar j = 0; j < N_STATES; j++) begin : g_state
    localparam int unsigned SRC0 = BACKWARD ? (2 * j) % N_STATES
                                            : j / 2;
    localparam int unsigned SRC1 = BACKWARD ? (2 * j + 1) % N_STATES
                                            : j / 2 + HALF;
    if (TIMING_MODEL) begin : g_model
      acs_vos_model #(
        .SM_W        (SM_W),
        .BM_W        (BM_W),
        .HAS_DECISION(HAS_DECISION),
        .SELECT_MAX  (SELECT_MAX),
        .DELAY_SCALE (DELAY_SCALE),
        .SKEW        (SKEW)
      ) u_acs (
        .clk    (clk),
        .init   (init),
        .init_sm(init_sm[j]),
        .sm0    (sm_q[SRC0]),
        .bm0    (bm0[j]),
        .sm1    (sm_q[SRC1]),
        .bm1    (bm1[j]),
        .sm_q   (sm_q[j]),
        .dec_q  (dec_q[j])
      );
    end else begin : g_rtl
      acs_unit #(
        .SM_W        (SM_W),
        .BM_W        (BM_W),
        .HAS_DECISION(HAS_DECISION),
        .SELECT_MAX  (SELECT_MAX)
      ) u_acs (
        .clk    (clk),
        .init   (init),
        .init_sm(init_sm[j]),
        .sm0    (sm_q[SRC0]),
        .bm0    (bm0[j]),
        .sm1    (sm_q[SRC1]),
        .bm1    (bm1[j]),
        .sm_q   (sm_q[j]),
        .dec_q  (dec_q[j])
      );
    end
  end

  initial begin
    assert (N_STATES >= 2 && (N_STATES & (N_STATES - 1)) == 0)
      else $error("trellis_smu: N_STATES must be a power of two");
  end

endmodule

// acs_vos_model: behavioural timing model (not synthesizable) of one ACS
// unit under voltage overscaling, with importance-aware clock skew on its
// output flip-flops.
//
// What it models. The logic is the same ripple-carry ACS as acs_unit (two
// adders of full and half adders, a carry-only comparator ending in a full
// adder, a 2:1 mux, output D-FFs), but every cell carries the unit gate
// delays of trellis_pkg (HA 1/1, FA carry 1 / sum 2, CA 1, MUX 1, D-FF
// clock-to-Q 2, zero setup and hold; the inverters on the comparator input
// are free). All gate delays are multiplied by DELAY_SCALE, the slow-down of
// the logic when the supply is lowered below the critical voltage; the
// clock period is not, so paths that no longer fit in the period capture
// wrong values. Each output flip-flop i is clocked SKEW[i] time units after
// clk: state metric bits 0..SM_W-1, then the decision bit when HAS_DECISION.
// Delays are transport delays, so glitches reach the flip-flops as they would
// in a gate-level simulation. One time unit is 1 ns here.
//
// Interface and timing. Same ports and function as acs_unit. sm0/sm1 are
// expected to come from other instances of this model (their bit i changes
// SKEW[i] + 2*DELAY_SCALE after clk) and bm0/bm1 from zero-skew flip-flops
// (2*DELAY_SCALE after clk). With DELAY_SCALE = 1 the longest path (LSB
// flip-flop through the comparator carry chain and the mux select back to
// the LSB flip-flop) takes 14 units, which is the clock period at the
// critical supply voltage; a clock period of at least 14 units then gives
// error-free operation.
//
// Follows the source design: the netlist, the gate delay values and the
// default clock delays (the Viterbi schedule). This model's own choices: the
// transport-delay style, the zero-delay inverters, the 1 ns time unit and the
// init port, which loads init_sm without modelled delay.
module acs_vos_model
  import trellis_pkg::*;
#(
  parameter int unsigned SM_W         = 8,
  parameter int unsigned BM_W         = 3,
  parameter bit          HAS_DECISION = 1'b1,
  parameter bit          SELECT_MAX   = 1'b0,
  parameter real         DELAY_SCALE  = 1.0,
  parameter real         SKEW [SM_W + 32'(HAS_DECISION)] = VIT_SKEW
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

  localparam real T_HA_S  = D_HA_S  * DELAY_SCALE;
  localparam real T_HA_C  = D_HA_C  * DELAY_SCALE;
  localparam real T_FA_S  = D_FA_S  * DELAY_SCALE;
  localparam real T_FA_C  = D_FA_C  * DELAY_SCALE;
  localparam real T_CA    = D_CA    * DELAY_SCALE;
  localparam real T_MUX   = D_MUX   * DELAY_SCALE;
  localparam real T_CLK_Q = D_CLK_Q * DELAY_SCALE;

  logic [SM_W-1:0] pa, pb, sm_d;
  logic [SM_W:0]   ca_c, cb_c;    // top carries are dropped (modulo 2^SM_W)
  logic [SM_W-1:0] cmp_c;
  logic            dif;

  // Gates are evaluated on input events only; settle gives every gate one
  // event shortly after time 0 so that all internal nets start consistent
  // with the inputs.
  logic settle;
  initial begin
    pa = '0; pb = '0; sm_d = '0; ca_c = '0; cb_c = '0; cmp_c = '0; dif = 1'b0;
    cmp_c[0] = 1'b1;
    settle   = 1'b0;
    #0.1 settle = 1'b1;
  end

  // Row 1 and row 2: ripple-carry adders (carry-in of the LSB is 0)
  for (genvar i = 0; i < SM_W; i++) begin : g_add
    if (i < BM_W) begin : g_fa
      always @(sm0[i], bm0[i], ca_c[i], settle) begin
        pa[i]     <= #(T_FA_S) sm0[i] ^ bm0[i] ^ ca_c[i];
        ca_c[i+1] <= #(T_FA_C) (sm0[i] & bm0[i]) | (sm0[i] & ca_c[i]) | (bm0[i] & ca_c[i]);
      end
      always @(sm1[i], bm1[i], cb_c[i], settle) begin
        pb[i]     <= #(T_FA_S) sm1[i] ^ bm1[i] ^ cb_c[i];
        cb_c[i+1] <= #(T_FA_C) (sm1[i] & bm1[i]) | (sm1[i] & cb_c[i]) | (bm1[i] & cb_c[i]);
      end
    end else begin : g_ha
      always @(sm0[i], ca_c[i], settle) begin
        pa[i]     <= #(T_HA_S) sm0[i] ^ ca_c[i];
        ca_c[i+1] <= #(T_HA_C) sm0[i] & ca_c[i];
      end
      always @(sm1[i], cb_c[i], settle) begin
        pb[i]     <= #(T_HA_S) sm1[i] ^ cb_c[i];
        cb_c[i+1] <= #(T_HA_C) sm1[i] & cb_c[i];
      end
    end
  end

  // Row 3: carry-only comparator pa + ~pb + 1, full adder in the MSB
  for (genvar i = 0; i < SM_W - 1; i++) begin : g_cmp
    always @(pa[i], pb[i], cmp_c[i], settle)
      cmp_c[i+1] <= #(T_CA) (pa[i] & ~pb[i]) | (pa[i] & cmp_c[i]) | (~pb[i] & cmp_c[i]);
  end
  always @(pa[SM_W-1], pb[SM_W-1], cmp_c[SM_W-1], settle)
    dif <= #(T_FA_S) pa[SM_W-1] ^ ~pb[SM_W-1] ^ cmp_c[SM_W-1];

  // 2:1 mux, select from the comparator sign bit
  for (genvar i = 0; i < SM_W; i++) begin : g_mux
    always @(pa[i], pb[i], dif, settle)
      sm_d[i] <= #(T_MUX) ((dif ^ SELECT_MAX) ? pa[i] : pb[i]);
  end

  // Output flip-flops, each on its own delayed clock
  for (genvar i = 0; i < SM_W; i++) begin : g_ff
    always @(posedge clk) begin
      logic v;
      if (SKEW[i] > 0.0) #(SKEW[i]);
      v = init ? init_sm[i] : sm_d[i];
      sm_q[i] <= #(T_CLK_Q) v;
    end
  end

  if (HAS_DECISION) begin : g_dec
    always @(posedge clk) begin
      logic v;
      if (SKEW[SM_W] > 0.0) #(SKEW[SM_W]);
      v = init ? 1'b0 : dif;
      dec_q <= #(T_CLK_Q) v;
    end
  end else begin : g_nodec
    assign dec_q = 1'b0;
  end

endmodule

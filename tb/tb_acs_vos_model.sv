// tb_acs_vos_model: timing simulation of small trellises built from the ACS
// timing model, at the critical supply voltage and under voltage
// overscaling, with and without the importance-aware clock skew. The
// Viterbi configuration is described here; a Max-Log-MAP configuration
// (8 states, 9-bit metrics, its own skew schedule, Kv = 0.90) runs alongside
// on its own clock and is described where it is declared.
//
// Four groups of four model instances each form a 4-state trellis (the same
// wiring as trellis_smu) with 8-bit metrics and 3-bit random branch metrics:
//   g0: delay scale 1.0 (critical supply), Viterbi clock skew schedule
//   g1: delay scale 1.0, all clock delays 0
//   g2: overscaled supply, Viterbi clock skew schedule
//   g3: overscaled supply, all clock delays 0
// The overscaled delay scale is KV_DELAY, the ratio of
// Vdd/(Vdd - Vt)^alpha at Vdd = Kv * Vcrit and at Vdd = Vcrit, for Kv = 0.85,
// Vt = 0.62 V, alpha = 1.2 and an assumed Vcrit of 1.8 V.
// The clock period is 14.05 units: the critical path is 14 units, and with
// the skew schedule the path from metric bit 1 (clocked 1.0253 late) through
// the comparator to bit 0 takes 13 units, so the period must be at least
// 14.0253 for error-free operation at the critical supply.
//
// Each cycle, the testbench reads what every instance launched (the
// flip-flop outputs, stable at the rising edge) and computes what an ideal
// ACS would capture one cycle later; a mismatch is a timing error of that
// ACS in that cycle. Checks: no error at all at the critical supply, with or
// without skew (checked per ACS per cycle); errors do occur when overscaled; with the skew schedule the
// upper metric bits (5..7) fail less often than without it. The per-ACS
// error rates are printed (the fraction of ACS-cycles with any output bit
// wrong, with and without skew).
module tb_acs_vos_model;
  import trellis_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  N = 4, W = 8, B = 3, G = 4;
  localparam int  CYCLES = 3000;
  localparam real VCRIT = 1.8, VT = 0.62, ALPHA = 1.2, KV = 0.85;
  localparam real KV_DELAY = ((KV * VCRIT) / ((KV * VCRIT - VT) ** ALPHA))
                           / (VCRIT / ((VCRIT - VT) ** ALPHA));
  localparam real T_CP = 14.05;
  localparam real ZERO_SKEW [9] = '{default: 0.0};

  logic clk = 1'b0;
  initial forever begin
    #(T_CP / 2.0) clk = 1'b1;
    #(T_CP / 2.0) clk = 1'b0;
  end

  logic          init;
  logic [W-1:0]  init_sm [N];
  logic [B-1:0]  bm0 [G][N], bm1 [G][N];
  logic [W-1:0]  q [G][N];
  logic          d [G][N];

  for (genvar g = 0; g < G; g++) begin : g_grp
    localparam real SCALE = (g < 2) ? 1.0 : KV_DELAY;
    for (genvar j = 0; j < N; j++) begin : g_st
      if (g % 2 == 0) begin : g_skew
        acs_vos_model #(.DELAY_SCALE(SCALE)) u_acs (
          .clk(clk), .init(init), .init_sm(init_sm[j]),
          .sm0(q[g][j / 2]), .bm0(bm0[g][j]), .sm1(q[g][j / 2 + N / 2]), .bm1(bm1[g][j]),
          .sm_q(q[g][j]), .dec_q(d[g][j]));
      end else begin : g_noskew
        acs_vos_model #(.DELAY_SCALE(SCALE), .SKEW(ZERO_SKEW)) u_acs (
          .clk(clk), .init(init), .init_sm(init_sm[j]),
          .sm0(q[g][j / 2]), .bm0(bm0[g][j]), .sm1(q[g][j / 2 + N / 2]), .bm1(bm1[g][j]),
          .sm_q(q[g][j]), .dec_q(d[g][j]));
      end
    end
  end

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------------
  // Max-Log-MAP configuration: 8-state trellis, 9-bit metrics, 8-bit branch
  // metrics (0..80, standing in for normalized ones), maximum selection, no
  // decision bit, Max-Log-MAP skew schedule. Critical path 15 units
  // (the comparator has one more carry-only stage), so the period is 15.05.
  //   h0: delay scale 1.0, skew schedule
  //   h1: overscaled (Kv = 0.90), skew schedule
  //   h2: overscaled (Kv = 0.90), all clock delays 0
  localparam int  MN = 8, MW = 9, MB = 8, H = 3;
  localparam real KV_M = 0.90;
  localparam real KV_M_DELAY = ((KV_M * VCRIT) / ((KV_M * VCRIT - VT) ** ALPHA))
                             / (VCRIT / ((VCRIT - VT) ** ALPHA));
  localparam real T_CP_M = 15.05;

  logic clk_m = 1'b0;
  initial forever begin
    #(T_CP_M / 2.0) clk_m = 1'b1;
    #(T_CP_M / 2.0) clk_m = 1'b0;
  end

  logic          init_m;
  logic [MW-1:0] init_sm_m [MN];
  logic [MB-1:0] mbm0 [H][MN], mbm1 [H][MN];
  logic [MW-1:0] mq [H][MN];
  logic          md [H][MN];
  bit            mlm_done = 1'b0;

  for (genvar h = 0; h < H; h++) begin : g_mgrp
    localparam real SCALE = (h == 0) ? 1.0 : KV_M_DELAY;
    for (genvar j = 0; j < MN; j++) begin : g_st
      acs_vos_model #(.SM_W(MW), .BM_W(MB), .HAS_DECISION(1'b0), .SELECT_MAX(1'b1),
                      .DELAY_SCALE(SCALE), .SKEW(h < 2 ? MLM_SKEW : ZERO_SKEW)) u_acs (
        .clk(clk_m), .init(init_m), .init_sm(init_sm_m[j]),
        .sm0(mq[h][j / 2]), .bm0(mbm0[h][j]), .sm1(mq[h][j / 2 + MN / 2]), .bm1(mbm1[h][j]),
        .sm_q(mq[h][j]), .dec_q(md[h][j]));
    end
  end

  logic [MW-1:0] mexp [H][MN];
  logic [MB-1:0] mnb0 [MN], mnb1 [MN];
  int merr_acs [H];
  int merr_bit [H][MW];

  initial begin
    foreach (mnb0[j]) begin mnb0[j] = '0; mnb1[j] = '0; end
    foreach (mbm0[h, j]) begin mbm0[h][j] = '0; mbm1[h][j] = '0; end
    foreach (merr_acs[h]) merr_acs[h] = 0;
    foreach (merr_bit[h, b]) merr_bit[h][b] = 0;
    init_m = 1'b1;
    foreach (init_sm_m[j]) init_sm_m[j] = (j == 0) ? MW'(100) : MW'(0);
    repeat (2) @(posedge clk_m);
    #1 init_m = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk_m);
      if (c > 0) begin
        for (int h = 0; h < H; h++) begin
          for (int j = 0; j < MN; j++) begin
            logic [MW-1:0] diff;
            diff = mq[h][j] ^ mexp[h][j];
            if (diff != '0) merr_acs[h]++;
            for (int b = 0; b < MW; b++) if (diff[b]) merr_bit[h][b]++;
            if (h == 0) begin
              checks++;
              if (diff != '0) begin
                failures++;
                if (failures < 20)
                  $display("FAIL Max-Log-MAP cycle %0d state %0d: got %0d expected %0d",
                           c, j, mq[h][j], mexp[h][j]);
              end
            end
            if (md[h][j] != 1'b0) begin
              checks++; failures++;
              $display("FAIL Max-Log-MAP decision output not constant");
            end
          end
        end
      end
      for (int h = 0; h < H; h++) begin
        for (int j = 0; j < MN; j++) begin
          logic [MW-1:0] ca, cb;
          ca = mq[h][j / 2] + MW'(mnb0[j]);
          cb = mq[h][j / 2 + MN / 2] + MW'(mnb1[j]);
          mexp[h][j] = (signed'(ca - cb) < 0) ? cb : ca;
        end
      end
      for (int j = 0; j < MN; j++) begin
        mnb0[j] = MB'($urandom_range(0, 80)); mnb1[j] = MB'($urandom_range(0, 80));
      end
      fork
        begin #(2.0 * 1.0);        for (int j = 0; j < MN; j++) begin mbm0[0][j] = mnb0[j]; mbm1[0][j] = mnb1[j]; end end
        begin #(2.0 * KV_M_DELAY); for (int j = 0; j < MN; j++) begin mbm0[1][j] = mnb0[j]; mbm1[1][j] = mnb1[j]; mbm0[2][j] = mnb0[j]; mbm1[2][j] = mnb1[j]; end end
      join_none
    end
    mlm_done = 1'b1;
  end

  initial begin
    #(T_CP_M * (CYCLES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] exp_q [G][N];
  logic         exp_d [G][N];
  logic [B-1:0] nb0 [N], nb1 [N];
  int err_acs [G];        // ACS-cycles with any wrong output bit
  int err_bit [G][W + 1]; // per output bit
  int samples = 0;

  function automatic real scale_of(int g);
    return (g < 2) ? 1.0 : KV_DELAY;
  endfunction

  initial begin
    foreach (nb0[j]) begin nb0[j] = '0; nb1[j] = '0; end
    init = 1'b1;
    foreach (init_sm[j]) init_sm[j] = (j == 0) ? W'(0) : W'(20);
    foreach (bm0[g, j]) begin bm0[g][j] = '0; bm1[g][j] = '0; end
    foreach (err_acs[g]) err_acs[g] = 0;
    foreach (err_bit[g, b]) err_bit[g][b] = 0;
    repeat (2) @(posedge clk);
    #1 init = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk);
      // compare what was captured at the previous edge (launched in the
      // last cycle, stable now) with the ideal result of the values
      // launched one cycle earlier and the branch metrics of that cycle
      if (c > 0) begin
        samples++;
        for (int g = 0; g < G; g++) begin
          for (int j = 0; j < N; j++) begin
            logic [W:0] diff;
            diff = {d[g][j], q[g][j]} ^ {exp_d[g][j], exp_q[g][j]};
            if (diff != '0) err_acs[g]++;
            // at the critical supply every ACS result must be exact
            if (g < 2) begin
              checks++;
              if (diff != '0) begin
                failures++;
                if (failures < 20)
                  $display("FAIL group %0d cycle %0d state %0d: got %h expected %h",
                           g, c, j, {d[g][j], q[g][j]}, {exp_d[g][j], exp_q[g][j]});
              end
            end
            for (int b = 0; b <= W; b++) if (diff[b]) err_bit[g][b]++;
          end
        end
      end
      for (int g = 0; g < G; g++) begin
        for (int j = 0; j < N; j++) begin
          logic [W-1:0] ca, cb;
          ca = q[g][j / 2] + W'(nb0[j]);
          cb = q[g][j / 2 + N / 2] + W'(nb1[j]);
          exp_d[g][j] = signed'(ca - cb) < 0;
          exp_q[g][j] = exp_d[g][j] ? ca : cb;
        end
      end
      // new branch metrics, launched by zero-skew flip-flops
      for (int j = 0; j < N; j++) begin nb0[j] = B'($urandom); nb1[j] = B'($urandom); end
      fork
        begin #(2.0 * 1.0);      for (int j = 0; j < N; j++) begin bm0[0][j] = nb0[j]; bm1[0][j] = nb1[j]; bm0[1][j] = nb0[j]; bm1[1][j] = nb1[j]; end end
        begin #(2.0 * KV_DELAY); for (int j = 0; j < N; j++) begin bm0[2][j] = nb0[j]; bm1[2][j] = nb1[j]; bm0[3][j] = nb0[j]; bm1[3][j] = nb1[j]; end end
      join_none
    end
    $display("delay scale under overscaling: %f", KV_DELAY);
    for (int g = 0; g < G; g++) begin
      $display("group %0d (scale %f, %s): ACS error rate %f, per bit 0..8: %0d %0d %0d %0d %0d %0d %0d %0d %0d",
               g, scale_of(g), (g % 2 == 0) ? "skewed" : "zero skew",
               real'(err_acs[g]) / real'(samples * N),
               err_bit[g][0], err_bit[g][1], err_bit[g][2], err_bit[g][3], err_bit[g][4],
               err_bit[g][5], err_bit[g][6], err_bit[g][7], err_bit[g][8]);
    end
    wait (mlm_done);
    $display("Max-Log-MAP, Kv %0.2f, delay scale under overscaling: %f", KV_M, KV_M_DELAY);
    for (int h = 0; h < H; h++) begin
      $display("mlm group %0d (%s): ACS error rate %f, per bit 0..8: %0d %0d %0d %0d %0d %0d %0d %0d %0d",
               h, (h == 0) ? "critical supply, skewed" : (h == 1) ? "overscaled, skewed" : "overscaled, zero skew",
               real'(merr_acs[h]) / real'((CYCLES - 1) * MN),
               merr_bit[h][0], merr_bit[h][1], merr_bit[h][2], merr_bit[h][3], merr_bit[h][4],
               merr_bit[h][5], merr_bit[h][6], merr_bit[h][7], merr_bit[h][8]);
    end
    checks++;
    if (merr_acs[1] == 0) begin failures++; $display("FAIL: no Max-Log-MAP timing error under overscaling"); end
    checks++;
    if (merr_bit[1][6] + merr_bit[1][7] + merr_bit[1][8] >= merr_bit[2][6] + merr_bit[2][7] + merr_bit[2][8]) begin
      failures++;
      $display("FAIL: Max-Log-MAP skew schedule does not protect the upper metric bits");
    end
    checks++;
    if (err_acs[2] == 0) begin failures++; $display("FAIL: no timing error under overscaling"); end
    checks++;
    if (err_bit[2][5] + err_bit[2][6] + err_bit[2][7] >= err_bit[3][5] + err_bit[3][6] + err_bit[3][7]) begin
      failures++;
      $display("FAIL: skew schedule does not protect the upper metric bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

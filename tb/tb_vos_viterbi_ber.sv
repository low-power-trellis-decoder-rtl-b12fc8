// tb_vos_viterbi_ber: decoder-level timing simulation of a Viterbi state
// metric unit under voltage overscaling, with and without the
// importance-aware clock skew schedule, at a reduced trellis size.
//
// Three state metric units decode the same received data:
//   u_ideal  - synthesizable RTL, no timing (reference decoding),
//   u_skew   - ACS timing models, supply at Kv = 0.85 of the critical
//              voltage, output flip-flops clocked with the Viterbi skew
//              schedule,
//   u_noskew - same supply, all clock delays zero.
// The units have 16 states (a constraint-length-5 code) instead of the 128
// of the full Viterbi unit, because 128 timing models per unit are too large
// to compile for a quick simulation; word lengths (8-bit metrics, 3-bit
// branch metrics), gate delays and clock delays are the full-size ones.
// Kv = 0.85 lowers the ACS energy by 1 - Kv^2 = 27.75 %. The gate delay
// factor at that supply follows delay ~ Vdd/(Vdd - Vt)^alpha with
// Vt = 0.62 V and alpha = 1.2; the critical supply itself is not known and
// is taken as 1.8 V here. The clock period is 14.05 ns (see
// tb_acs_vos_model).
//
// Channel: random information bits in frames of FRAME bits plus 4 zero tail
// bits, encoded with a rate-1/2 code with generators 23 and 35 (octal), new
// bit in the LSB of the state, BPSK over AWGN at Eb/N0 = 4 dB (noise from
// the Box-Muller method), each received value quantized to 2 bits (levels
// 0..3, 3 meaning +1). A transition's 3-bit branch metric is the sum of its
// two symbol distances (0..6). Each frame starts with init (state 0 at 0,
// all others at 40) and is traced back from state 0 by the testbench.
//
// Checks: the ideal decoder's bit error rate stays below 2 %; the timing
// models produce timing errors (their decisions differ from the ideal ones
// at least once); the skew-scheduled decoder makes no more bit errors than
// the zero-skew one. The bit error rates of all three are printed.
module tb_vos_viterbi_ber;
  timeunit 1ns;
  timeprecision 1ps;

  import trellis_pkg::*;

  localparam int  FRAME  = 250;
  localparam int  FRAMES = 80;
  localparam int  STEPS  = FRAME + 4;
  localparam int  VN = 16, VW = VIT_SM_W, VB = VIT_BM_W;
  localparam int  NI = 3;
  localparam real EBN0_DB = 4.0;
  localparam real VCRIT = 1.8, VT = 0.62, ALPHA = 1.2, KV = 0.85;
  localparam real VOS_DELAY = ((KV * VCRIT) / ((KV * VCRIT - VT) ** ALPHA))
                            / (VCRIT / ((VCRIT - VT) ** ALPHA));
  localparam real T_CP = 14.05;

  logic clk = 1'b0;
  initial forever begin
    #(T_CP / 2.0) clk = 1'b1;
    #(T_CP / 2.0) clk = 1'b0;
  end

  logic          vit_init [NI];
  logic [VW-1:0] vit_init_sm [VN];
  logic [VB-1:0] vit_bm0 [NI][VN], vit_bm1 [NI][VN];
  logic [VW-1:0] vit_sm [NI][VN];
  logic          vit_dec [NI][VN];
  localparam real NO_SKEW [9] = '{default: 0.0};

  for (genvar g = 0; g < NI; g++) begin : g_inst
    if (g == 0) begin : g_ideal
      trellis_smu #(.N_STATES(VN)) u_smu (
        .clk(clk), .init(vit_init[g]), .init_sm(vit_init_sm),
        .bm0(vit_bm0[g]), .bm1(vit_bm1[g]), .sm_q(vit_sm[g]), .dec_q(vit_dec[g]));
    end else begin : g_vos
      trellis_smu #(.N_STATES(VN), .TIMING_MODEL(1'b1), .DELAY_SCALE(VOS_DELAY),
                    .SKEW(g == 1 ? VIT_SKEW : NO_SKEW)) u_smu (
        .clk(clk), .init(vit_init[g]), .init_sm(vit_init_sm),
        .bm0(vit_bm0[g]), .bm1(vit_bm1[g]), .sm_q(vit_sm[g]), .dec_q(vit_dec[g]));
    end
  end

  int checks = 0, failures = 0;

  initial begin
    #(T_CP * (FRAMES * (STEPS + 4) + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit parity8(logic [7:0] v);
    return ^v;
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 32'hFFFF_FFFE)) + 0.5) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  function automatic int quant(real r);
    if (r < -0.5) return 0;
    if (r < 0.0)  return 1;
    if (r < 0.5)  return 2;
    return 3;
  endfunction

  bit           bits [STEPS];
  int           r0 [STEPS], r1 [STEPS];
  bit           decs [NI][STEPS][VN];
  logic [VB-1:0] nb0 [VN], nb1 [VN];
  int           bit_err [NI];
  int           dec_diff [NI];
  int           nbits = 0;

  task automatic apply_bm(int g, real dly);
    fork
      begin
        #(dly);
        vit_bm0[g] = nb0;
        vit_bm1[g] = nb1;
      end
    join_none
  endtask

  initial begin
    real sigma;
    int  st;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (EBN0_DB / 10.0))));
    foreach (vit_init_sm[j]) vit_init_sm[j] = (j == 0) ? VW'(0) : VW'(40);
    foreach (nb0[j]) begin nb0[j] = '0; nb1[j] = '0; end
    for (int g = 0; g < NI; g++) begin
      vit_init[g] = 1'b0;
      vit_bm0[g] = nb0; vit_bm1[g] = nb1;
      bit_err[g] = 0; dec_diff[g] = 0;
    end

    for (int f = 0; f < FRAMES; f++) begin
      // encode and transmit one frame
      st = 0;
      for (int t = 0; t < STEPS; t++) begin
        logic [7:0] reg8;
        bits[t] = (t < FRAME) ? 1'($urandom) : 1'b0;
        reg8 = {3'b000, 4'(st), bits[t]};
        r0[t] = quant((parity8(reg8 & 8'o23) ? 1.0 : -1.0) + sigma * gauss());
        r1[t] = quant((parity8(reg8 & 8'o35) ? 1.0 : -1.0) + sigma * gauss());
        st = int'(reg8[3:0]);
      end
      // initialize the metrics
      @(posedge clk);
      #1;
      for (int g = 0; g < NI; g++) vit_init[g] = 1'b1;
      @(posedge clk);
      #1;
      for (int g = 0; g < NI; g++) vit_init[g] = 1'b0;
      // one trellis step per clock; outputs captured at an edge are read
      // 0.5 ns before the next edge, when every delayed flip-flop has settled
      for (int t = 0; t <= STEPS; t++) begin
        if (t < STEPS) begin
          for (int j = 0; j < VN; j++) begin
            for (int k = 0; k < 2; k++) begin
              int p, bm;
              logic [7:0] reg8;
              p = k ? (j / 2 + VN / 2) : (j / 2);
              reg8 = {3'b000, 4'(p), 1'(j & 1)};
              bm = (parity8(reg8 & 8'o23) ? 3 - r0[t] : r0[t])
                 + (parity8(reg8 & 8'o35) ? 3 - r1[t] : r1[t]);
              if (k == 0) nb0[j] = VB'(bm); else nb1[j] = VB'(bm);
            end
          end
          apply_bm(0, 0.5);
          apply_bm(1, 2.0 * VOS_DELAY);
          apply_bm(2, 2.0 * VOS_DELAY);
        end
        if (t > 0) begin
          #(T_CP - 1.5);
          for (int g = 0; g < NI; g++)
            for (int j = 0; j < VN; j++) decs[g][t - 1][j] = vit_dec[g][j];
        end
        @(posedge clk);
        #1;
      end
      // trace back each decoder from state 0
      for (int g = 0; g < NI; g++) begin
        st = 0;
        for (int t = STEPS - 1; t >= 0; t--) begin
          if (t < FRAME && (st & 1) != int'(bits[t])) bit_err[g]++;
          if (g > 0 && decs[g][t] != decs[0][t]) dec_diff[g]++;
          st = decs[g][t][st] ? (st / 2) : (st / 2 + VN / 2);
        end
      end
      nbits += FRAME;
    end

    $display("Eb/N0 %0.1f dB, Kv %0.2f (delay factor %f, ACS energy saving %0.2f %%), %0d bits",
             EBN0_DB, KV, VOS_DELAY, 100.0 * (1.0 - KV * KV), nbits);
    $display("ideal          : bit errors %0d, BER %e", bit_err[0], real'(bit_err[0]) / real'(nbits));
    $display("VOS, skewed    : bit errors %0d, BER %e, steps with a wrong decision %0d",
             bit_err[1], real'(bit_err[1]) / real'(nbits), dec_diff[1]);
    $display("VOS, zero skew : bit errors %0d, BER %e, steps with a wrong decision %0d",
             bit_err[2], real'(bit_err[2]) / real'(nbits), dec_diff[2]);
    checks++;
    if (real'(bit_err[0]) / real'(nbits) >= 0.02) begin
      failures++; $display("FAIL: ideal decoder BER too high");
    end
    checks++;
    if (dec_diff[1] == 0 || dec_diff[2] == 0) begin
      failures++; $display("FAIL: overscaled decoders show no timing error");
    end
    checks++;
    if (bit_err[1] > bit_err[2]) begin
      failures++; $display("FAIL: skew schedule decodes worse than zero skew");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

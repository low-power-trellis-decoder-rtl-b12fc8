// tb_trellis_vos_top: end-to-end test of the trellis state metric datapaths
// at their default sizes, used as two real decoders.
//
// Viterbi: random information bits are encoded with a rate-1/2, 128-state
// (constraint length 8) feedforward code, generators 247 and 371 (octal), and
// terminated with 7 zero bits. Each coded bit is sent as a 2-bit soft symbol
// (0 for a 0, 3 for a 1); a few symbols are moved one level toward the other
// value. The 3-bit branch metric of a transition is the sum of the two
// symbol distances (0..6). Decisions are stored each step and traced back
// from state 0; the decoded bits must equal the sent ones.
//
// Max-Log-MAP: one constituent decoder of a rate-1/3 Turbo code, the 8-state
// recursive code with feedback 1+D^2+D^3 and feedforward 1+D+D^3, terminated
// with 3 tail bits. Received systematic and parity values are integers in
// -20..20 (noise as above); the branch metric of a transition is
// 40 +/- ys +/- yp, always 0..80, which is the normalized form that keeps the
// 9-bit state metrics in their modular range. The alpha unit runs forward,
// the beta unit runs backward over the same block; the testbench forms the
// max-log likelihood ratio of each bit from the units' metrics (taken
// relative to state 0, which the modular arithmetic allows) and its sign
// must give the sent bit.
//
// Every cycle, every state metric and decision is also compared with an
// unbounded-integer model of the recursion, reduced modulo 2^W. Counted
// mechanisms, each of which must occur: state metric wrap-around in all
// three units, both decision values, noisy symbols, and re-initialization
// (the whole sequence runs twice, with init between the runs).
module tb_trellis_vos_top;
  timeunit 1ns;
  timeprecision 1ps;

  import trellis_pkg::*;

  localparam int VN = VIT_STATES, VW = VIT_SM_W, VB = VIT_BM_W;
  localparam int MN = MLM_STATES, MW = MLM_SM_W, MB = MLM_BM_W;
  localparam int VL = 300;            // Viterbi information bits per block
  localparam int VT = VL + 7;         // with tail
  localparam int ML = 200;            // Max-Log-MAP information bits per block
  localparam int MT = ML + 3;         // with tail
  localparam int RUNS = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          vit_init, alpha_init, beta_init;
  logic [VW-1:0] vit_init_sm [VN];
  logic [VB-1:0] vit_bm0 [VN], vit_bm1 [VN];
  logic [VW-1:0] vit_sm [VN];
  logic          vit_dec [VN];
  logic [MW-1:0] alpha_init_sm [MN], beta_init_sm [MN];
  logic [MB-1:0] alpha_bm0 [MN], alpha_bm1 [MN], beta_bm0 [MN], beta_bm1 [MN];
  logic [MW-1:0] alpha_sm [MN], beta_sm [MN];

  trellis_vos_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (RUNS * (VT + MT + 20) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int idx, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s[%0d]: got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  function automatic bit parity8(logic [7:0] v);
    return ^v;
  endfunction

  // mechanism counters
  int n_vit_wrap = 0, n_alpha_wrap = 0, n_beta_wrap = 0;
  int n_dec0 = 0, n_dec1 = 0, n_noisy = 0, n_init = 0;

  // ---------------------------------------------------------------- Viterbi
  bit     v_bits [VT];
  int     v_r0 [VT], v_r1 [VT];
  bit     v_decs [VT][VN];
  longint vr [VN], vr_n [VN];

  task automatic run_viterbi();
    int st, cyc_start, cyc_end;
    // encoder: register {previous 7 bits, new bit}, new bit in LSB
    st = 0;
    for (int t = 0; t < VT; t++) begin
      logic [7:0] reg8;
      bit c0, c1;
      v_bits[t] = (t < VL) ? 1'($urandom) : 1'b0;
      reg8 = {7'(st), v_bits[t]};
      c0 = parity8(reg8 & 8'o247);
      c1 = parity8(reg8 & 8'o371);
      v_r0[t] = c0 ? 3 : 0;
      v_r1[t] = c1 ? 3 : 0;
      if ($urandom_range(0, 9) == 0) begin v_r0[t] = c0 ? 2 : 1; n_noisy++; end
      if ($urandom_range(0, 9) == 0) begin v_r1[t] = c1 ? 2 : 1; n_noisy++; end
      st = int'(reg8[6:0]);
    end
    // init: state 0 preferred
    @(negedge clk);
    vit_init = 1'b1;
    foreach (vit_init_sm[j]) begin
      vit_init_sm[j] = (j == 0) ? VW'(220) : VW'(250);
      vr[j] = (j == 0) ? 220 : 250;
    end
    @(posedge clk); #1;
    n_init++;
    foreach (vit_sm[j]) check("vit init", j, longint'(vit_sm[j]), vr[j]);
    @(negedge clk);
    vit_init = 1'b0;
    cyc_start = $time;
    for (int t = 0; t < VT; t++) begin
      for (int j = 0; j < VN; j++) begin
        for (int k = 0; k < 2; k++) begin
          int p, bm;
          logic [7:0] reg8;
          p = k ? (j / 2 + VN / 2) : (j / 2);
          reg8 = {7'(p), 1'(j & 1)};
          bm = ((parity8(reg8 & 8'o247)) ? 3 - v_r0[t] : v_r0[t])
             + ((parity8(reg8 & 8'o371)) ? 3 - v_r1[t] : v_r1[t]);
          if (k == 0) vit_bm0[j] = VB'(bm); else vit_bm1[j] = VB'(bm);
        end
      end
      for (int j = 0; j < VN; j++) begin
        longint ca, cb;
        ca = vr[j / 2] + longint'(vit_bm0[j]);
        cb = vr[j / 2 + VN / 2] + longint'(vit_bm1[j]);
        vr_n[j] = (ca < cb) ? ca : cb;
      end
      @(posedge clk); #1;
      for (int j = 0; j < VN; j++) begin
        if ((vr_n[j] >> VW) != (vr[j] >> VW)) n_vit_wrap++;
        check("vit sm", j, longint'(vit_sm[j]), vr_n[j] % (1 << VW));
        v_decs[t][j] = vit_dec[j];
        if (vit_dec[j]) n_dec1++; else n_dec0++;
      end
      vr = vr_n;
      @(negedge clk);
    end
    cyc_end = $time;
    // one trellis step per clock
    check("vit cycles per block", 0, longint'((cyc_end - cyc_start) / 10), longint'(VT));
    // trace back from state 0
    st = 0;
    for (int t = VT - 1; t >= 0; t--) begin
      bit u;
      u = 1'(st & 1);
      if (t < VL) check("vit decoded bit", t, longint'(u), longint'(v_bits[t]));
      st = v_decs[t][st] ? (st / 2) : (st / 2 + VN / 2);
    end
    check("vit final state", 0, longint'(st), 0);
  endtask

  // ---------------------------------------------------------- Max-Log-MAP
  bit     m_bits [MT];
  int     m_ys [MT], m_yp [MT];
  longint ar [MN], ar_n [MN], br [MN], br_n [MN];
  longint a_hw [MT + 1][MN], b_hw [MT + 1][MN];

  // transition s -> s' = ((s << 1) | b) & 7: systematic and parity bits
  function automatic int gamma(int t, int s, int b);
    int u, p;
    u = b ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    p = b ^ (s & 1) ^ ((s >> 2) & 1);
    return 40 + (u ? m_ys[t] : -m_ys[t]) + (p ? m_yp[t] : -m_yp[t]);
  endfunction

  // state metric relative to state 0, valid because the spread is < 2^(MW-1)
  function automatic longint rel(logic [MW-1:0] v, logic [MW-1:0] v0);
    logic [MW-1:0] d;
    d = v - v0;
    return longint'(signed'(d));
  endfunction

  task automatic run_mlm();
    int st;
    st = 0;
    for (int t = 0; t < MT; t++) begin
      int b, u, p;
      if (t < ML) begin
        u = int'($urandom_range(0, 1));
        b = u ^ ((st >> 1) & 1) ^ ((st >> 2) & 1);
      end else begin
        b = 0;                                   // tail: drive register to 0
        u = ((st >> 1) & 1) ^ ((st >> 2) & 1);
      end
      p = b ^ (st & 1) ^ ((st >> 2) & 1);
      m_bits[t] = 1'(u);
      m_ys[t] = u ? 12 : -12;
      m_yp[t] = p ? 12 : -12;
      if ($urandom_range(0, 9) == 0) begin m_ys[t] = -m_ys[t] / 3; n_noisy++; end
      if ($urandom_range(0, 9) == 0) begin m_yp[t] = -m_yp[t] / 3; n_noisy++; end
      st = ((st << 1) | b) & 7;
    end
    // init both recursions: state 0 known at both ends of the block
    @(negedge clk);
    alpha_init = 1'b1; beta_init = 1'b1;
    foreach (alpha_init_sm[j]) begin
      alpha_init_sm[j] = (j == 0) ? MW'(200) : MW'(100);
      beta_init_sm[j]  = (j == 0) ? MW'(450) : MW'(350);   // wraps early
      ar[j] = (j == 0) ? 200 : 100;
      br[j] = (j == 0) ? 450 : 350;
    end
    @(posedge clk); #1;
    n_init++;
    foreach (alpha_sm[j]) begin
      check("alpha init", j, longint'(alpha_sm[j]), ar[j]);
      check("beta init", j, longint'(beta_sm[j]), br[j]);
      a_hw[0][j] = rel(alpha_sm[j], alpha_sm[0]);
      b_hw[MT][j] = rel(beta_sm[j], beta_sm[0]);
    end
    @(negedge clk);
    alpha_init = 1'b0; beta_init = 1'b0;
    // alpha runs over steps 0..MT-1 while beta runs over MT-1..0
    for (int n = 0; n < MT; n++) begin
      int tb_ = MT - 1 - n;
      for (int j = 0; j < MN; j++) begin
        alpha_bm0[j] = MB'(gamma(n, j / 2, j & 1));
        alpha_bm1[j] = MB'(gamma(n, j / 2 + MN / 2, j & 1));
        beta_bm0[j]  = MB'(gamma(tb_, j, 0));
        beta_bm1[j]  = MB'(gamma(tb_, j, 1));
      end
      for (int j = 0; j < MN; j++) begin
        longint ca, cb;
        ca = ar[j / 2] + longint'(alpha_bm0[j]);
        cb = ar[j / 2 + MN / 2] + longint'(alpha_bm1[j]);
        ar_n[j] = (ca >= cb) ? ca : cb;
        ca = br[(2 * j) % MN] + longint'(beta_bm0[j]);
        cb = br[(2 * j + 1) % MN] + longint'(beta_bm1[j]);
        br_n[j] = (ca >= cb) ? ca : cb;
      end
      @(posedge clk); #1;
      for (int j = 0; j < MN; j++) begin
        if ((ar_n[j] >> MW) != (ar[j] >> MW)) n_alpha_wrap++;
        if ((br_n[j] >> MW) != (br[j] >> MW)) n_beta_wrap++;
        check("alpha sm", j, longint'(alpha_sm[j]), ar_n[j] % (1 << MW));
        check("beta sm", j, longint'(beta_sm[j]), br_n[j] % (1 << MW));
      end
      for (int j = 0; j < MN; j++) begin
        a_hw[n + 1][j] = rel(alpha_sm[j], alpha_sm[0]);
        b_hw[tb_][j]   = rel(beta_sm[j], beta_sm[0]);
      end
      ar = ar_n; br = br_n;
      @(negedge clk);
    end
    // max-log LLR of each information bit from the units' own metrics
    for (int t = 0; t < ML; t++) begin
      longint best1, best0;
      best1 = -(64'(1) << 40);
      best0 = -(64'(1) << 40);
      for (int s = 0; s < MN; s++) begin
        for (int b = 0; b < 2; b++) begin
          int u, s2;
          longint m;
          u  = b ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
          s2 = ((s << 1) | b) & 7;
          m  = a_hw[t][s] + longint'(gamma(t, s, b)) + b_hw[t + 1][s2];
          if (u == 1) begin if (m > best1) best1 = m; end
          else        begin if (m > best0) best0 = m; end
        end
      end
      check("mlm decoded bit", t, longint'(best1 > best0), longint'(m_bits[t]));
    end
  endtask

  initial begin
    vit_init = 1'b0; alpha_init = 1'b0; beta_init = 1'b0;
    foreach (vit_init_sm[j]) begin vit_init_sm[j] = '0; vit_bm0[j] = '0; vit_bm1[j] = '0; end
    foreach (alpha_init_sm[j]) begin
      alpha_init_sm[j] = '0; beta_init_sm[j] = '0;
      alpha_bm0[j] = '0; alpha_bm1[j] = '0; beta_bm0[j] = '0; beta_bm1[j] = '0;
    end
    for (int r = 0; r < RUNS; r++) begin
      run_viterbi();
      run_mlm();
    end
    $display("mechanisms: vit_wrap=%0d alpha_wrap=%0d beta_wrap=%0d dec0=%0d dec1=%0d noisy_symbols=%0d init=%0d",
             n_vit_wrap, n_alpha_wrap, n_beta_wrap, n_dec0, n_dec1, n_noisy, n_init);
    if (n_vit_wrap == 0)   begin failures++; $display("FAIL: no Viterbi metric wrap"); end
    if (n_alpha_wrap == 0) begin failures++; $display("FAIL: no alpha metric wrap"); end
    if (n_beta_wrap == 0)  begin failures++; $display("FAIL: no beta metric wrap"); end
    if (n_dec0 == 0 || n_dec1 == 0) begin failures++; $display("FAIL: a decision value never occurred"); end
    if (n_noisy == 0)      begin failures++; $display("FAIL: no noisy symbol"); end
    if (n_init < 2 * RUNS) begin failures++; $display("FAIL: re-initialization not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

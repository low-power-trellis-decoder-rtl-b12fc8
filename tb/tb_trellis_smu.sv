// tb_trellis_smu: self-check of the trellis state metric unit in three
// configurations at once: the 128-state Viterbi unit at its default
// parameters, and the 8-state Max-Log-MAP forward and backward units.
//
// The reference keeps every state metric as an unbounded integer and applies
// the trellis recursion directly (predecessors j>>1 and j>>1 + N/2 forward,
// successors 2i and 2i+1 mod N backward); the unit's metrics must equal the
// reference modulo 2^SM_W and the Viterbi decisions must equal (A < B).
// Branch metrics are random; the Max-Log-MAP ones are limited to 0..80 so the
// metric spread (at most 3 * 80) stays below 2^8, standing in for the branch
// metric normalization that keeps the 9-bit modular metrics valid. The run
// is long enough that every metric wraps around many times.
module tb_trellis_smu;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int VN = 128, VW = 8, VB = 3;
  localparam int MN = 8,   MW = 9, MB = 8;
  localparam int STEPS = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          init;
  logic [VW-1:0] v_init [VN];
  logic [VB-1:0] v_bm0 [VN], v_bm1 [VN];
  logic [VW-1:0] v_sm [VN];
  logic          v_dec [VN];
  logic [MW-1:0] m_init [MN];
  logic [MB-1:0] a_bm0 [MN], a_bm1 [MN], b_bm0 [MN], b_bm1 [MN];
  logic [MW-1:0] a_sm [MN], b_sm [MN];
  logic          a_dec [MN], b_dec [MN];

  trellis_smu u_vit (
    .clk(clk), .init(init), .init_sm(v_init), .bm0(v_bm0), .bm1(v_bm1),
    .sm_q(v_sm), .dec_q(v_dec));

  trellis_smu #(.N_STATES(MN), .SM_W(MW), .BM_W(MB), .HAS_DECISION(1'b0),
                .SELECT_MAX(1'b1), .BACKWARD(1'b0)) u_alpha (
    .clk(clk), .init(init), .init_sm(m_init), .bm0(a_bm0), .bm1(a_bm1),
    .sm_q(a_sm), .dec_q(a_dec));

  trellis_smu #(.N_STATES(MN), .SM_W(MW), .BM_W(MB), .HAS_DECISION(1'b0),
                .SELECT_MAX(1'b1), .BACKWARD(1'b1)) u_beta (
    .clk(clk), .init(init), .init_sm(m_init), .bm0(b_bm0), .bm1(b_bm1),
    .sm_q(b_sm), .dec_q(b_dec));

  int checks = 0, failures = 0;

  initial begin
    repeat (STEPS + 1000) @(posedge clk);
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

  longint vr [VN], vr_n [VN], ar [MN], ar_n [MN], br [MN], br_n [MN];
  bit     vd_n [VN];
  int     dec_ones = 0, dec_zeros = 0;

  initial begin
    init = 1'b1;
    foreach (v_init[j]) begin v_init[j] = (j == 0) ? 8'd0 : 8'd32; vr[j] = (j == 0) ? 0 : 32; end
    foreach (m_init[j]) begin m_init[j] = (j == 0) ? 9'd200 : 9'd100; ar[j] = (j == 0) ? 200 : 100; br[j] = ar[j]; end
    foreach (v_bm0[j]) begin v_bm0[j] = '0; v_bm1[j] = '0; end
    foreach (a_bm0[j]) begin a_bm0[j] = '0; a_bm1[j] = '0; b_bm0[j] = '0; b_bm1[j] = '0; end
    @(posedge clk); #1;
    foreach (v_sm[j]) check("vit init", j, longint'(v_sm[j]), vr[j]);
    foreach (a_sm[j]) check("alpha init", j, longint'(a_sm[j]), ar[j]);
    foreach (b_sm[j]) check("beta init", j, longint'(b_sm[j]), br[j]);
    @(negedge clk);
    init = 1'b0;

    for (int t = 0; t < STEPS; t++) begin
      foreach (v_bm0[j]) begin v_bm0[j] = VB'($urandom); v_bm1[j] = VB'($urandom); end
      foreach (a_bm0[j]) begin
        a_bm0[j] = MB'($urandom_range(0, 80)); a_bm1[j] = MB'($urandom_range(0, 80));
        b_bm0[j] = MB'($urandom_range(0, 80)); b_bm1[j] = MB'($urandom_range(0, 80));
      end
      // reference recursion
      for (int j = 0; j < VN; j++) begin
        longint ca, cb;
        ca = vr[j / 2] + longint'(v_bm0[j]);
        cb = vr[j / 2 + VN / 2] + longint'(v_bm1[j]);
        vr_n[j] = (ca < cb) ? ca : cb;
        vd_n[j] = (ca < cb);
      end
      for (int j = 0; j < MN; j++) begin
        longint ca, cb;
        ca = ar[j / 2] + longint'(a_bm0[j]);
        cb = ar[j / 2 + MN / 2] + longint'(a_bm1[j]);
        ar_n[j] = (ca >= cb) ? ca : cb;
        ca = br[(2 * j) % MN] + longint'(b_bm0[j]);
        cb = br[(2 * j + 1) % MN] + longint'(b_bm1[j]);
        br_n[j] = (ca >= cb) ? ca : cb;
      end
      vr = vr_n; ar = ar_n; br = br_n;
      @(posedge clk); #1;
      for (int j = 0; j < VN; j++) begin
        check("vit sm", j, longint'(v_sm[j]), vr[j] % (1 << VW));
        check("vit dec", j, longint'(v_dec[j]), longint'(vd_n[j]));
        if (v_dec[j]) dec_ones++; else dec_zeros++;
      end
      for (int j = 0; j < MN; j++) begin
        check("alpha sm", j, longint'(a_sm[j]), ar[j] % (1 << MW));
        check("beta sm", j, longint'(b_sm[j]), br[j] % (1 << MW));
      end
      @(negedge clk);
    end
    // the metrics must have wrapped around several times
    if (vr[0] < 4 * (1 << VW) || ar[0] < 4 * (1 << MW) || br[0] < 4 * (1 << MW)) begin
      failures++;
      $display("FAIL coverage: metrics did not wrap (vit %0d alpha %0d beta %0d)", vr[0], ar[0], br[0]);
    end
    if (dec_ones == 0 || dec_zeros == 0) begin
      failures++;
      $display("FAIL coverage: decisions ones=%0d zeros=%0d", dec_ones, dec_zeros);
    end
    $display("true metric of state 0 after %0d steps: vit %0d alpha %0d beta %0d", STEPS, vr[0], ar[0], br[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

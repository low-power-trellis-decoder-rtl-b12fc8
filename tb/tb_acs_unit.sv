// tb_acs_unit: self-check of the ACS unit in both of its configurations,
// Viterbi (8-bit metrics, 3-bit branch metrics, minimum, decision bit) and
// Max-Log-MAP (9-bit metrics, 8-bit branch metrics, maximum, no decision).
//
// Stimulus: the two candidate paths are given true (unbounded) metrics
// A = base + x + bm0 and B = base + y + bm1 with |A - B| < 2^(W-1); the unit
// sees only base + x and base + y modulo 2^W, so wrap-around is exercised.
// The expected survivor is min(A, B) or max(A, B) reduced modulo 2^W, the
// expected decision bit is (A < B). Inputs change on the falling edge and the
// result is checked after the next rising edge (one cycle of latency).
module tb_acs_unit;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int VW = 8, VB = 3;   // Viterbi word lengths
  localparam int MW = 9, MB = 8;   // Max-Log-MAP word lengths

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          init;
  logic [VW-1:0] v_init_sm, v_sm0, v_sm1, v_q;
  logic [VB-1:0] v_bm0, v_bm1;
  logic          v_dec;
  logic [MW-1:0] m_init_sm, m_sm0, m_sm1, m_q;
  logic [MB-1:0] m_bm0, m_bm1;
  logic          m_dec;

  acs_unit #(.SM_W(VW), .BM_W(VB), .HAS_DECISION(1'b1), .SELECT_MAX(1'b0)) u_vit (
    .clk(clk), .init(init), .init_sm(v_init_sm), .sm0(v_sm0), .bm0(v_bm0),
    .sm1(v_sm1), .bm1(v_bm1), .sm_q(v_q), .dec_q(v_dec));

  acs_unit #(.SM_W(MW), .BM_W(MB), .HAS_DECISION(1'b0), .SELECT_MAX(1'b1)) u_mlm (
    .clk(clk), .init(init), .init_sm(m_init_sm), .sm0(m_sm0), .bm0(m_bm0),
    .sm1(m_sm1), .bm1(m_bm1), .sm_q(m_q), .dec_q(m_dec));

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Draw candidate metrics whose true difference is below 2^(w-1).
  task automatic draw(input int w, input int bw, output longint sm0, output longint sm1,
                      output longint bm0, output longint bm1, output longint a, output longint b);
    longint base, x, y, lim;
    lim = 64'(1) << (w - 1);
    do begin
      base = longint'($urandom);
      x    = longint'($urandom_range(0, 32'(lim - 1)));
      y    = longint'($urandom_range(0, 32'(lim - 1)));
      bm0  = longint'($urandom_range(0, (1 << bw) - 1));
      bm1  = longint'($urandom_range(0, (1 << bw) - 1));
      a    = base + x + bm0;
      b    = base + y + bm1;
    end while (a - b >= lim || b - a >= lim);
    sm0 = base + x;
    sm1 = base + y;
  endtask

  longint vs0, vs1, vb0, vb1, va, vbb, ms0, ms1, mb0, mb1, ma, mbb;
  longint v_exp, m_exp, v_dexp;
  int v_ties = 0, v_wraps = 0;

  initial begin
    init = 1'b1;
    v_init_sm = 8'd77; m_init_sm = 9'd300;
    {v_sm0, v_sm1, v_bm0, v_bm1, m_sm0, m_sm1, m_bm0, m_bm1} = '0;
    @(posedge clk); #1;
    check("vit init metric", longint'(v_q), 77);
    check("vit init decision", longint'(v_dec), 0);
    check("mlm init metric", longint'(m_q), 300);
    check("mlm decision absent", longint'(m_dec), 0);
    @(negedge clk);
    init = 1'b0;

    for (int n = 0; n < 4000; n++) begin
      draw(VW, VB, vs0, vs1, vb0, vb1, va, vbb);
      draw(MW, MB, ms0, ms1, mb0, mb1, ma, mbb);
      // every 16th vector forces a tie on the Viterbi side
      if (n % 16 == 0) begin vs1 = vs0; vb1 = vb0; vbb = va; end
      v_sm0 = VW'(vs0); v_sm1 = VW'(vs1); v_bm0 = VB'(vb0); v_bm1 = VB'(vb1);
      m_sm0 = MW'(ms0); m_sm1 = MW'(ms1); m_bm0 = MB'(mb0); m_bm1 = MB'(mb1);
      v_exp  = ((va < vbb) ? va : vbb) & ((64'(1) << VW) - 1);
      v_dexp = (va < vbb) ? 1 : 0;
      m_exp  = ((ma >= mbb) ? ma : mbb) & ((64'(1) << MW) - 1);
      if (va == vbb) v_ties++;
      if ((va >> VW) != (vbb >> VW)) v_wraps++;
      @(posedge clk); #1;
      check("vit metric", longint'(v_q), v_exp);
      check("vit decision", longint'(v_dec), v_dexp);
      check("mlm metric", longint'(m_q), m_exp);
      check("mlm decision absent", longint'(m_dec), 0);
      @(negedge clk);
    end
    if (v_ties == 0 || v_wraps == 0) begin
      failures++;
      $display("FAIL coverage: ties=%0d wraps=%0d", v_ties, v_wraps);
    end
    $display("ties=%0d candidate pairs straddling a wrap=%0d cycles=%0d", v_ties, v_wraps, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

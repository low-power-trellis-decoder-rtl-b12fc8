// tb_fa_cell: exhaustive self-check of the 1-bit full adder against integer
// addition ({co, s} = a + b + ci) over all eight input combinations.
module tb_fa_cell;
  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  fa_cell dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

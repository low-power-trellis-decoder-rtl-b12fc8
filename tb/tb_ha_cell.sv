// tb_ha_cell: exhaustive self-check of the 1-bit half adder against integer
// addition ({co, s} = a + b) over all four input combinations.
module tb_ha_cell;
  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, s, co;
  int checks = 0, failures = 0;

  ha_cell dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> co=%0d s=%0d", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ca_cell: exhaustive self-check of the carry-only adder: co must be the
// carry (bit 1) of a + b + ci for all eight input combinations.
module tb_ca_cell;
  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, ci, co;
  int checks = 0, failures = 0;

  ca_cell dut (.a(a), .b(b), .ci(ci), .co(co));

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
      if (co != (int'(a) + int'(b) + int'(ci) >= 2)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d", a, b, ci, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

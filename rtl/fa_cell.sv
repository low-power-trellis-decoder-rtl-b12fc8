// fa_cell: 1-bit full adder, the FA of the gate-level ACS unit.
// Purely combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
module fa_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule

// ca_cell: 1-bit carry-only adder, the CA of the gate-level ACS unit.
// It is a full adder without the sum output: co = majority(a, b, ci).
// A chain of these, with one operand inverted and a carry-in of 1, forms the
// carry chain of the ACS comparator (a - b = a + ~b + 1).
module ca_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic co
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb co = (a & b) | (a & ci) | (b & ci);
endmodule

// ha_cell: 1-bit half adder, the HA of the gate-level ACS unit.
// Purely combinational: s = a ^ b, co = a & b.
module ha_cell (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule

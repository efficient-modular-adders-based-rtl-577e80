// Peres gate (3x3 reversible gate).
//
// Function: p = a, q = a ^ b, r = (a & b) ^ c. With c tied to 0 the gate is
// a half adder: q is the sum and r the carry of a + b. The modulo adders of
// this design use it in that role for the end-around-carry increment row.
// Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule

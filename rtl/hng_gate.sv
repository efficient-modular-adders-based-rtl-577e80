// HNG gate (4x4 reversible gate).
//
// Function: p = a, q = b, r = a ^ b ^ c, s = ((a ^ b) & c) ^ (a & b) ^ d.
// With d tied to 0 the gate is a full adder: r is the sum and s the carry of
// a + b + c, while p and q are kept only to make the mapping reversible
// (garbage outputs). All full adders of this design are HNG gates.
// Purely combinational, no clock.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;
  assign axb = a ^ b;
  assign p   = a;
  assign q   = b;
  assign r   = axb ^ c;
  assign s   = (axb & c) ^ (a & b) ^ d;
endmodule

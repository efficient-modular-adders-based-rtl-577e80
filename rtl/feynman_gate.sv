// Feynman gate (2x2 reversible controlled-NOT).
//
// Function: p = a, q = a ^ b. The mapping is a bijection on {a,b}, so the
// inputs can always be recovered from the outputs. Tied to b = 0 the gate
// copies a onto two wires, which is how fan-out is made in a reversible
// netlist; this design uses it that way in the forward converter (that use
// is a choice of this design). Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule

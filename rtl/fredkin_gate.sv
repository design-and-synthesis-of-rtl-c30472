// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
// Outputs P = A, Q = A'B xor AC, R = A'C xor AB: when A is 0, B and C pass
// straight through; when A is 1 they are swapped. The gate is its own
// inverse and conserves the number of ones. Quantum cost 5. It belongs to
// the basic gate set of the library; none of the sequential circuits
// here uses it. Purely combinational, no clock.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);

endmodule

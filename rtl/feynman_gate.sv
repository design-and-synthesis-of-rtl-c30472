// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// Outputs P = A and Q = A xor B. The mapping (A,B) -> (P,Q) is a
// bijection, so the inputs can always be recovered from the outputs.
// With B tied to 0 it copies A (the reversible way to fan a signal out);
// with B tied to 1 it gives A and not A. Quantum cost 1.
// Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule

// sayem_gate: the 4x4 reversible Sayem gate.
//
// Outputs P = A, Q = A'B xor AC, R = A'B xor AC xor D, S = AB xor A'C xor D.
// A selects: Q is B when A is 0 and C when A is 1 (a 2:1 multiplexer), S
// carries the input not selected, xored with D. With D tied to 0, R is a
// second copy of Q, which the sequential circuits feed back into B or C to
// hold a value; lint tools then report the loop through this gate, which is
// intended. Quantum cost 6. Purely combinational, no clock.
module sayem_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic sel;

  assign sel = (~a & b) ^ (a & c);
  assign p   = a;
  assign q   = sel;
  assign r   = sel ^ d;
  assign s   = (a & b) ^ (~a & c) ^ d;

endmodule

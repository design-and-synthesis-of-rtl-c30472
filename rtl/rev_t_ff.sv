// rev_t_ff: master-slave T flip-flop built from three reversible gates.
//
// Two Sayem gates, both with input D tied to 0 so that output R is a copy
// of output Q, form a master and a slave latch; a Feynman gate closes the
// toggle loop.
//   Master (first Sayem):  A = clk, B = its own R (hold), C = q xor t.
//     Q = clk ? (q xor t) : held value; transparent while clk is 1.
//   Slave (second Sayem):  A = clk copy (master P), B = master Q,
//     C = its own R (hold). Q = clk ? held value : master Q;
//     transparent while clk is 0.
//   Feynman: A = slave Q, B = t. P is the output q, Q = q xor t (output
//     qp) goes back to the master's C input.
// While clk is 1 the master takes q xor t and the slave holds q; when clk
// falls the master holds and the slave passes the new value on. The output
// therefore changes just after each falling clk edge:
//   t = 0 -> q keeps its value; t = 1 -> q toggles.
//
// Gates: 2 Sayem + 1 Feynman; constant inputs: 2 (the two 0s);
// garbage: 3 (master S, slave S, slave P = clock copy), on garbage[2:0];
// quantum cost 6 + 6 + 1 = 13.
//
// Timing: falling-edge triggered; t must be stable while clk is 1 and at
// the falling edge. qp = q xor t is the next-state value (the feedback
// line), not the complement of q. No reset: the state is unknown at power
// up. garbage[2] is a copy of clk, used by the counter to show the clock
// passing through.
//
// The two hold loops (R -> B in the master, R -> C in the slave) and the
// toggle loop through the Feynman gate are deliberate combinational loops
// that store the state; tools report them as such. The gate netlist is
// the published one; the edge polarity follows from the gate equations.
module rev_t_ff (
  input  logic       clk,       // clock; state changes after its falling edge
  input  logic       t,         // toggle enable
  output logic       q,         // state
  output logic       qp,        // q xor t, the feedback line
  output logic [2:0] garbage    // [0] master S, [1] slave S, [2] clock copy
);

  logic clk_m;     // master P: clock passed on to the slave
  logic m_q;       // master Q, into slave B
  logic m_hold;    // master R, fed back to master B
  logic s_q;       // slave Q, into the Feynman gate
  logic s_hold;    // slave R, fed back to slave C
  logic next_q;    // q xor t, into master C

  sayem_gate u_master (
    .a (clk),
    .b (m_hold),
    .c (next_q),
    .d (1'b0),
    .p (clk_m),
    .q (m_q),
    .r (m_hold),
    .s (garbage[0])
  );

  sayem_gate u_slave (
    .a (clk_m),
    .b (m_q),
    .c (s_hold),
    .d (1'b0),
    .p (garbage[2]),
    .q (s_q),
    .r (s_hold),
    .s (garbage[1])
  );

  feynman_gate u_toggle (
    .a (s_q),
    .b (t),
    .p (q),
    .q (next_q)
  );

  assign qp = next_q;

endmodule

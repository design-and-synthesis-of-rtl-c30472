// rev_d_latch: level-sensitive D latch built from two reversible gates.
//
// A Sayem gate does the storing. Its select input A is the enable E, its B
// input is its own R output fed back, its C input is the data D and its D
// input is tied to 0. With D at 0 the R output equals the Q output, so
//   Q = E ? D : Q(previous)
// which is a transparent latch: while E is 1 the output follows D, and
// when E falls the feedback loop R -> B keeps the last value. A Feynman
// gate with its B input tied to 1 then gives the true and complemented
// outputs (Q and Q').
//
// Gates: 1 Sayem + 1 Feynman; constant inputs: 2 (the 0 and the 1);
// garbage: 2 (the Sayem P and S outputs, brought out on garbage[1:0]);
// quantum cost 6 + 1 = 7.
//
// Timing: no clock; q follows d while e is 1 and holds while e is 0.
// There is no reset; the stored value is unknown until e is first 1.
//
// The storing loop R -> B is a deliberate combinational loop: a reversible
// gate has no internal state, so this loop is the only place the latch can
// hold its value. Lint and synthesis tools report it as a combinational
// loop; that is the intended structure. The netlist is the one published
// for this latch; naming and the garbage port are this design's choices.
module rev_d_latch (
  input  logic       e,         // enable: 1 = transparent, 0 = hold
  input  logic       d,         // data
  output logic       q,         // stored value
  output logic       q_n,       // complement of q
  output logic [1:0] garbage    // [0] Sayem P (copy of e), [1] Sayem S
);

  logic sg_q;   // selected value (Sayem Q)
  logic hold;   // Sayem R, fed back to Sayem B

  sayem_gate u_store (
    .a (e),
    .b (hold),
    .c (d),
    .d (1'b0),
    .p (garbage[0]),
    .q (sg_q),
    .r (hold),
    .s (garbage[1])
  );

  feynman_gate u_out (
    .a (sg_q),
    .b (1'b1),
    .p (q),
    .q (q_n)
  );

endmodule

// rev_pkg: shared constants for the reversible sequential circuits.
//
// Reversible circuits are judged by four figures of merit: the number of
// reversible gates, the number of constant inputs tied to 0 or 1, the
// number of garbage outputs (outputs that are neither a result nor fed
// back), and the quantum cost, the sum of the per-gate costs below. The
// per-gate quantum costs (Feynman 1, Fredkin 5, Sayem 6) are the published
// values for these gates. The circuit cost records are built from the
// gate netlists in this library and are what the testbenches compare
// against the published comparison tables.
package rev_pkg;

  localparam int unsigned QC_FEYNMAN = 1;
  localparam int unsigned QC_FREDKIN = 5;
  localparam int unsigned QC_SAYEM   = 6;

  // Figures of merit of one reversible circuit.
  typedef struct packed {
    logic [7:0] gates;
    logic [7:0] const_inputs;
    logic [7:0] garbage;
    logic [7:0] quantum_cost;
  } rev_cost_t;

  // Cost of a circuit made of n_fg Feynman and n_sg Sayem gates.
  function automatic rev_cost_t circuit_cost(int unsigned n_fg, int unsigned n_sg,
                                             logic [7:0] n_const, logic [7:0] n_garbage);
    rev_cost_t c;
    c.gates        = 8'(n_fg + n_sg);
    c.const_inputs = n_const;
    c.garbage      = n_garbage;
    c.quantum_cost = 8'(n_fg * QC_FEYNMAN + n_sg * QC_SAYEM);
    return c;
  endfunction

  // D latch: one Sayem gate, one Feynman gate; constants 0 and 1;
  // garbage: the Sayem P and S outputs.
  localparam rev_cost_t COST_D_LATCH = circuit_cost(1, 1, 2, 2);

  // T flip-flop: two Sayem gates, one Feynman gate; constants: the two
  // Sayem D inputs tied to 0; garbage: both Sayem S outputs and the clock
  // copy on the second Sayem P output.
  localparam rev_cost_t COST_T_FF = circuit_cost(1, 2, 2, 3);

  // Four-bit asynchronous up/down counter, exactly as drawn: four T
  // flip-flops and three Feynman gates between the stages.
  localparam rev_cost_t COST_COUNTER_AS_DRAWN =
      circuit_cost(4 * 1 + 3, 4 * 2, 4 * 2, 4 * 3);

  // The same counter with one extra Feynman gate (input tied to 1) that
  // inverts the up/down control so that a 1 selects counting up.
  localparam rev_cost_t COST_COUNTER_UP_HIGH =
      circuit_cost(4 * 1 + 3 + 1, 4 * 2, 4 * 2 + 1, 4 * 3 + 1);

endpackage

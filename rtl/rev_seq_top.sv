// rev_seq_top: the reversible sequential circuits side by side.
//
// The library's three proposed circuits are independent designs, so this
// top places them next to each other, each with its own ports:
//   - a D latch (rev_d_latch): one Sayem and one Feynman gate;
//   - a T flip-flop (rev_t_ff): two Sayem and one Feynman gate;
//   - a 4-bit asynchronous up/down counter (rev_updown_counter): four T
//     flip-flops joined by Feynman gates;
// plus a Fredkin gate (fredkin_gate), the one gate of the basic gate set
// that none of the circuits uses. Garbage outputs are brought out so that
// every reversible gate output is visible, as reversible design requires.
//
// Timing: the latch is level sensitive (transparent while latch_e is 1),
// the flip-flop and each counter stage change after a falling edge of
// their clock, the Fredkin gate is combinational. Nothing has a reset.
// Grouping the circuits in one top is this design's choice.
module rev_seq_top #(
  parameter int unsigned CNT_WIDTH        = 4,     // counter stages
  parameter bit          CNT_UP_WHEN_HIGH = 1'b1,  // 1: cnt_up_dn = 1 counts up
  localparam int unsigned CNT_GARB_W      = 3 * CNT_WIDTH + (CNT_UP_WHEN_HIGH ? 1 : 0)
) (
  // D latch
  input  logic                  latch_e,
  input  logic                  latch_d,
  output logic                  latch_q,
  output logic                  latch_q_n,
  output logic [1:0]            latch_garbage,
  // T flip-flop
  input  logic                  tff_clk,
  input  logic                  tff_t,
  output logic                  tff_q,
  output logic                  tff_qp,
  output logic [2:0]            tff_garbage,
  // up/down counter
  input  logic                  cnt_pulses,
  input  logic                  cnt_en,
  input  logic                  cnt_up_dn,
  output logic [CNT_WIDTH-1:0]  cnt_count,
  output logic [CNT_GARB_W-1:0] cnt_garbage,
  // Fredkin gate
  input  logic                  frg_a,
  input  logic                  frg_b,
  input  logic                  frg_c,
  output logic                  frg_p,
  output logic                  frg_q,
  output logic                  frg_r
);

  rev_d_latch u_latch (
    .e       (latch_e),
    .d       (latch_d),
    .q       (latch_q),
    .q_n     (latch_q_n),
    .garbage (latch_garbage)
  );

  rev_t_ff u_tff (
    .clk     (tff_clk),
    .t       (tff_t),
    .q       (tff_q),
    .qp      (tff_qp),
    .garbage (tff_garbage)
  );

  rev_updown_counter #(
    .WIDTH        (CNT_WIDTH),
    .UP_WHEN_HIGH (CNT_UP_WHEN_HIGH)
  ) u_counter (
    .count_pulses (cnt_pulses),
    .count_en     (cnt_en),
    .up_dn        (cnt_up_dn),
    .count        (cnt_count),
    .garbage      (cnt_garbage)
  );

  fredkin_gate u_fredkin (
    .a (frg_a),
    .b (frg_b),
    .c (frg_c),
    .p (frg_p),
    .q (frg_q),
    .r (frg_r)
  );

endmodule

// rev_updown_counter: asynchronous (ripple) up/down counter built from
// reversible T flip-flops and Feynman gates.
//
// Every stage is a rev_t_ff with its T input on the count-enable line. The
// first stage is clocked by the count pulses. Between stage i and stage
// i+1 sits a Feynman gate with A = q of stage i and B = the direction
// line: its P output (a copy of q) is count bit i, and its Q output,
// q xor direction, is the clock of stage i+1. The last stage's q is the
// top count bit directly.
//
// The flip-flops change state after a falling clock edge. With the
// direction line at 0, stage i+1 is clocked by q[i] and toggles when q[i]
// falls from 1 to 0: the carry of an up count. With the direction line at
// 1, it is clocked by not q[i] and toggles when q[i] rises: the borrow of a
// down count. So the direction line itself counts down when 1.
// With UP_WHEN_HIGH = 1 (the default) one more Feynman gate, its B input
// tied to 1, inverts the up_dn input onto the direction line, so that
// up_dn = 1 counts up and up_dn = 0 counts down. With UP_WHEN_HIGH = 0 the
// circuit is exactly the published one (four T flip-flops and three
// Feynman gates) and up_dn = 1 counts down.
//
// Cost with WIDTH = 4: as published 15 gates (8 Sayem, 7 Feynman), 8
// constant inputs, 12 garbage outputs, quantum cost 55; with the inverter
// 16 gates, 9 constants, 13 garbage, quantum cost 56.
//
// Timing: each count pulse's falling edge adds or subtracts one once the
// ripple has settled through all stages (WIDTH gate stages at worst).
// count_en must be 1 for counting; at 0 the count holds. Changing up_dn
// flips the stage clocks and can itself move the count, as in any ripple
// up/down counter: change it only while the count is not needed. There is
// no reset; the count starts at an unknown value.
//
// Each stage stores its state in combinational loops of reversible gates
// (see rev_t_ff); tools report those loops.
module rev_updown_counter #(
  parameter int unsigned WIDTH        = 4,     // number of counter stages
  parameter bit          UP_WHEN_HIGH = 1'b1,  // 1: up_dn = 1 counts up
  localparam int unsigned GARB_W      = 3 * WIDTH + (UP_WHEN_HIGH ? 1 : 0)
) (
  input  logic              count_pulses,  // clock of the first stage
  input  logic              count_en,      // T input of every stage
  input  logic              up_dn,         // count direction
  output logic [WIDTH-1:0]  count,         // count[0] = first stage
  output logic [GARB_W-1:0] garbage        // [3i+2:3i] stage i; top bit: up_dn copy
);

  logic             dir;            // direction line into the Feynman gates
  logic [WIDTH-1:0] stage_clk;      // clock of each stage
  logic [WIDTH-1:0] stage_q;        // state of each stage
  logic [WIDTH-1:0] stage_qp;       // toggle feedback of each stage (internal)

  generate
    if (UP_WHEN_HIGH) begin : g_dir_inv
      feynman_gate u_dir (
        .a (up_dn),
        .b (1'b1),
        .p (garbage[GARB_W-1]),
        .q (dir)
      );
    end else begin : g_dir_direct
      assign dir = up_dn;
    end
  endgenerate

  assign stage_clk[0] = count_pulses;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    rev_t_ff u_tff (
      .clk     (stage_clk[i]),
      .t       (count_en),
      .q       (stage_q[i]),
      .qp      (stage_qp[i]),
      .garbage (garbage[3*i +: 3])
    );

    if (i < WIDTH - 1) begin : g_link
      feynman_gate u_link (
        .a (stage_q[i]),
        .b (dir),
        .p (count[i]),
        .q (stage_clk[i+1])
      );
    end else begin : g_last
      assign count[i] = stage_q[i];
    end
  end

endmodule

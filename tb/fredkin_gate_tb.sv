// fredkin_gate_tb: exhaustive check of the Fredkin gate.
// For all eight inputs, expects B and C to pass through when A is 0 and to
// be swapped when A is 1, checks that the number of ones is kept, that the
// mapping is one-to-one and that applying the gate twice restores the
// inputs (it is its own inverse).
module fredkin_gate_tb;
  logic a, b, c, p, q, r;
  logic a2, b2, c2, p2, q2, r2;
  int checks = 0, failures = 0;
  logic [7:0] seen;
  logic [2:0] expect_out;

  fredkin_gate dut  (.a, .b, .c, .p, .q, .r);
  fredkin_gate dut2 (.a(a2), .b(b2), .c(c2), .p(p2), .q(q2), .r(r2));

  assign {a2, b2, c2} = {p, q, r};

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      expect_out = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== expect_out) begin
        failures++;
        $display("FAIL in=%03b out=%b%b%b expected %03b", i[2:0], p, q, r, expect_out);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(i))) begin
        failures++;
        $display("FAIL ones not conserved for in=%03b", i[2:0]);
      end
      checks++;
      if ({p2, q2, r2} !== 3'(i)) begin
        failures++;
        $display("FAIL gate applied twice gives %b%b%b for in=%03b", p2, q2, r2, i[2:0]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping is not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

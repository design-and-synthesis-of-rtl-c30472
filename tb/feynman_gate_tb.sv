// feynman_gate_tb: exhaustive check of the Feynman gate.
// Applies all four input pairs, compares P and Q with A and A xor B worked
// out here, and checks that the four output pairs are all different (the
// gate is reversible).
module feynman_gate_tb;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut (.a, .b, .p, .q);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> p=%0b q=%0b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL mapping is not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

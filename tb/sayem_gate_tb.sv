// sayem_gate_tb: exhaustive check of the Sayem gate.
// For all sixteen inputs, compares the outputs with a reference written as
// a multiplexer (Q selects B or C by A, S takes the other one, D is xored
// into R and S) and checks that the mapping is one-to-one.
module sayem_gate_tb;
  logic a, b, c, d, p, q, r, s;
  logic sel, other;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  sayem_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      sel   = a ? c : b;
      other = a ? b : c;
      checks++;
      if ({p, q, r, s} !== {a, sel, sel ^ d, other ^ d}) begin
        failures++;
        $display("FAIL in=%04b out=%b%b%b%b", i[3:0], p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL mapping is not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

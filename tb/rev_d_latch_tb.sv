// rev_d_latch_tb: checks the reversible D latch.
// First replays the published waveform: enable high with d low then high,
// then enable low with d low then high (q must stay 1). Then drives 400
// random (e, d) pairs and compares q and q_n with a reference latch kept
// here. Also checks the gate-count record against the published figures
// (2 gates, 2 constants, 2 garbage outputs, quantum cost 7).
module rev_d_latch_tb;
  import rev_pkg::*;

  logic       e, d, q, q_n;
  logic [1:0] garbage;
  logic       ref_q;
  int checks = 0, failures = 0;
  int holds = 0, follows = 0;

  rev_d_latch dut (.e, .d, .q, .q_n, .garbage);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_q, input string what);
    checks++;
    if (q !== exp_q || q_n !== ~exp_q || garbage[0] !== e) begin
      failures++;
      $display("FAIL %s: e=%0b d=%0b q=%0b q_n=%0b g0=%0b expected q=%0b",
               what, e, d, q, q_n, garbage[0], exp_q);
    end
  endtask

  initial begin
    // Published waveform, in 1 us steps.
    e = 1; d = 0; #10; check(1'b0, "wave step 1");
    e = 1; d = 1; #10; check(1'b1, "wave step 2");
    e = 0; d = 0; #10; check(1'b1, "wave step 3");
    e = 0; d = 1; #10; check(1'b1, "wave step 4");
    e = 0; d = 0; #10; check(1'b1, "wave step 5");

    ref_q = 1'b1;
    for (int i = 0; i < 400; i++) begin
      e = 1'($urandom);
      d = 1'($urandom);
      #10;
      if (e) begin
        ref_q = d;
        follows++;
      end else begin
        holds++;
      end
      check(ref_q, "random");
    end

    checks++;
    if (holds == 0 || follows == 0) begin
      failures++;
      $display("FAIL random run missed a mode: holds=%0d follows=%0d", holds, follows);
    end

    checks++;
    if (COST_D_LATCH !== rev_cost_t'({8'd2, 8'd2, 8'd2, 8'd7})) begin
      failures++;
      $display("FAIL cost record %p", COST_D_LATCH);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

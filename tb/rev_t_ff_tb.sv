// rev_t_ff_tb: checks the reversible master-slave T flip-flop.
// Runs a 10-unit clock for 300 cycles. t changes only while clk is low, a
// reference state is toggled at each falling edge when t is 1, and q is
// compared with it before and after each edge: q must not move on a
// rising edge or while clk is high, and must take its new value right
// after the falling edge. qp must always equal q xor t. The state has no
// reset, so the reference starts from the first value read. Also checks
// the cost record against the published figures (3 gates, 2 constants,
// 3 garbage outputs, quantum cost 13).
module rev_t_ff_tb;
  import rev_pkg::*;

  logic       clk, t, q, qp;
  logic [2:0] garbage;
  logic       ref_q;
  int checks = 0, failures = 0;
  int toggles = 0, keeps = 0;

  rev_t_ff dut (.clk, .t, .q, .qp, .garbage);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== ref_q || qp !== (q ^ t) || garbage[2] !== clk) begin
      failures++;
      $display("FAIL %s at %0t: clk=%0b t=%0b q=%0b qp=%0b expected q=%0b",
               what, $time, clk, t, q, qp, ref_q);
    end
  endtask

  initial begin
    clk = 1'b0;
    t   = 1'b0;
    #5;
    ref_q = q;
    for (int i = 0; i < 300; i++) begin
      // clk low: choose t.
      t = 1'($urandom);
      #2;
      check("clk low");
      clk = 1'b1;          // rising edge: no change expected
      #2;
      check("after rising edge");
      #3;
      check("clk high");
      clk = 1'b0;          // falling edge
      if (t) begin
        ref_q = ~ref_q;
        toggles++;
      end else begin
        keeps++;
      end
      #1;
      check("after falling edge");
      #2;
    end

    checks++;
    if (toggles == 0 || keeps == 0) begin
      failures++;
      $display("FAIL missed a mode: toggles=%0d keeps=%0d", toggles, keeps);
    end

    checks++;
    if (COST_T_FF !== rev_cost_t'({8'd3, 8'd2, 8'd3, 8'd13})) begin
      failures++;
      $display("FAIL cost record %p", COST_T_FF);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rev_updown_counter_tb: checks the 4-bit reversible ripple up/down counter.
// Two counters share the count pulses, enable and direction input: one at
// the defaults (up_dn = 1 counts up) and one built exactly as published
// (UP_WHEN_HIGH = 0, so up_dn = 1 counts down). After every falling edge of
// the count pulses each count is compared with a reference that adds or
// subtracts one modulo 16. The run counts down for 40 pulses, up for 40,
// holds with the enable low for 10, then runs random direction segments.
// A direction change can move a ripple counter by itself, so the
// references are reloaded after each change. The published down-count
// waveform (1111, 1110, ... 0110 with the control at 0) is checked as a
// sequence on the default counter. The cost records are checked against
// the published 15 gates, 8 constants, 12 garbage, quantum cost 55.
module rev_updown_counter_tb;
  import rev_pkg::*;

  localparam int W = 4;

  logic         pulses, en, up_dn;
  logic [W-1:0] count, count_raw;
  logic [3*W:0]   garbage;
  logic [3*W-1:0] garbage_raw;
  logic [W-1:0] ref_cnt, ref_raw;
  int checks = 0, failures = 0;
  int ups = 0, downs = 0, stays = 0;
  int wave_pos;
  logic [W-1:0] wave [10] = '{4'b1111, 4'b1110, 4'b1101, 4'b1100, 4'b1011,
                              4'b1010, 4'b1001, 4'b1000, 4'b0111, 4'b0110};
  bit wave_done;

  rev_updown_counter dut (
    .count_pulses (pulses), .count_en (en), .up_dn (up_dn),
    .count (count), .garbage (garbage)
  );

  rev_updown_counter #(.UP_WHEN_HIGH(1'b0)) dut_raw (
    .count_pulses (pulses), .count_en (en), .up_dn (up_dn),
    .count (count_raw), .garbage (garbage_raw)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic resync();
    #2;
    ref_cnt = count;
    ref_raw = count_raw;
    wave_pos = -1;
  endtask

  // One count pulse: high for 5, low for 5; checks after the falling edge.
  task automatic pulse();
    pulses = 1'b1;
    #5;
    checks++;
    if (count !== ref_cnt || count_raw !== ref_raw) begin
      failures++;
      $display("FAIL count moved while pulse high: %b/%b expected %b/%b",
               count, count_raw, ref_cnt, ref_raw);
    end
    pulses = 1'b0;
    if (!en) begin
      stays++;
    end else if (up_dn) begin
      ref_cnt = ref_cnt + 1'b1;
      ref_raw = ref_raw - 1'b1;
      ups++;
    end else begin
      ref_cnt = ref_cnt - 1'b1;
      ref_raw = ref_raw + 1'b1;
      downs++;
    end
    #2;
    checks++;
    if (count !== ref_cnt || count_raw !== ref_raw) begin
      failures++;
      $display("FAIL at %0t en=%0b up_dn=%0b: count=%b raw=%b expected %b/%b",
               $time, en, up_dn, count, count_raw, ref_cnt, ref_raw);
    end
    // Published down-count sequence.
    if (en && !up_dn && !wave_done) begin
      if (wave_pos < 0 && count == 4'b1111) wave_pos = 0;
      if (wave_pos >= 0) begin
        checks++;
        if (count !== wave[wave_pos]) begin
          failures++;
          $display("FAIL waveform step %0d: %b expected %b", wave_pos, count, wave[wave_pos]);
        end
        wave_pos++;
        if (wave_pos == 10) wave_done = 1'b1;
      end
    end
    #3;
  endtask

  initial begin
    pulses = 1'b0; en = 1'b1; up_dn = 1'b0;
    wave_done = 1'b0;
    resync();
    repeat (40) pulse();
    up_dn = 1'b1; resync();
    repeat (40) pulse();
    en = 1'b0; resync();
    repeat (10) pulse();
    en = 1'b1; resync();
    for (int seg = 0; seg < 20; seg++) begin
      up_dn = 1'($urandom);
      resync();
      repeat (1 + $urandom_range(0, 20)) pulse();
    end

    checks++;
    if (ups == 0 || downs == 0 || stays == 0 || !wave_done) begin
      failures++;
      $display("FAIL missed a mode: ups=%0d downs=%0d holds=%0d waveform=%0b",
               ups, downs, stays, wave_done);
    end
    checks++;
    if (COST_COUNTER_AS_DRAWN !== rev_cost_t'({8'd15, 8'd8, 8'd12, 8'd55}) ||
        COST_COUNTER_UP_HIGH  !== rev_cost_t'({8'd16, 8'd9, 8'd13, 8'd56})) begin
      failures++;
      $display("FAIL cost records %p %p", COST_COUNTER_AS_DRAWN, COST_COUNTER_UP_HIGH);
    end
    // Clock copies of the stages pass through unchanged to the garbage bits.
    checks++;
    if (garbage[2] !== pulses || garbage[3*W] !== up_dn) begin
      failures++;
      $display("FAIL garbage clock/direction copies");
    end

    $display("counted up %0d, down %0d, held %0d", ups, downs, stays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rev_seq_top_tb: end-to-end test of the whole library at its defaults.
// One shared 10-unit step drives all four circuits at once for 600 steps
// with random inputs: the latch enable and data, the flip-flop's t and a
// clock, the counter's enable and direction (changed only every 25 steps)
// with its count pulses, and the Fredkin inputs. Every output is compared
// with a reference model kept here. It counts how often each mechanism
// happened (latch follow and hold, flip-flop toggle and keep, counter up,
// down and hold, Fredkin pass and swap) and fails if any never did.
module rev_seq_top_tb;
  localparam int W = 4;

  logic latch_e, latch_d, latch_q, latch_q_n;
  logic [1:0] latch_garbage;
  logic tff_clk, tff_t, tff_q, tff_qp;
  logic [2:0] tff_garbage;
  logic cnt_pulses, cnt_en, cnt_up_dn;
  logic [W-1:0] cnt_count;
  logic [3*W:0] cnt_garbage;
  logic frg_a, frg_b, frg_c, frg_p, frg_q, frg_r;

  logic ref_latch, ref_tff;
  logic [W-1:0] ref_cnt;
  int checks = 0, failures = 0;
  int n_follow = 0, n_hold = 0, n_toggle = 0, n_keep = 0;
  int n_up = 0, n_down = 0, n_stay = 0, n_pass = 0, n_swap = 0;
  bit latch_known;

  rev_seq_top dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    latch_e = 1; latch_d = 0;
    tff_clk = 0; tff_t = 0;
    cnt_pulses = 0; cnt_en = 1; cnt_up_dn = 1;
    {frg_a, frg_b, frg_c} = '0;
    #5;
    ref_latch = 1'b0;
    ref_tff   = tff_q;
    ref_cnt   = cnt_count;

    for (int step = 0; step < 600; step++) begin
      // Phase 1: clocks low, new inputs.
      latch_e = 1'($urandom);
      latch_d = 1'($urandom);
      tff_t   = 1'($urandom);
      {frg_a, frg_b, frg_c} = 3'($urandom);
      if (step % 25 == 0) begin
        cnt_en    = ($urandom_range(0, 3) != 0);
        cnt_up_dn = 1'($urandom);
        #1;
        ref_cnt = cnt_count;   // a direction change may move a ripple counter
      end
      #2;
      if (latch_e) begin
        ref_latch = latch_d;
        n_follow++;
      end else begin
        n_hold++;
      end
      expect_eq(W'(latch_q), W'(ref_latch), "latch q");
      expect_eq(W'(latch_q_n), W'(!ref_latch), "latch q_n");
      expect_eq(W'({frg_p, frg_q, frg_r}),
                W'(frg_a ? {frg_a, frg_c, frg_b} : {frg_a, frg_b, frg_c}), "fredkin");
      if (frg_a && (frg_b != frg_c)) n_swap++;
      else if (!frg_a && (frg_b != frg_c)) n_pass++;

      // Phase 2: clocks high.
      tff_clk = 1'b1;
      cnt_pulses = 1'b1;
      #3;
      expect_eq(W'(tff_q), W'(ref_tff), "tff q, clock high");
      expect_eq(W'(tff_qp), W'(ref_tff ^ tff_t), "tff qp");
      expect_eq(cnt_count, ref_cnt, "count, clock high");

      // Phase 3: falling edge.
      tff_clk = 1'b0;
      cnt_pulses = 1'b0;
      if (tff_t) begin
        ref_tff = ~ref_tff;
        n_toggle++;
      end else begin
        n_keep++;
      end
      if (!cnt_en) begin
        n_stay++;
      end else if (cnt_up_dn) begin
        ref_cnt = ref_cnt + 1'b1;
        n_up++;
      end else begin
        ref_cnt = ref_cnt - 1'b1;
        n_down++;
      end
      #2;
      expect_eq(W'(tff_q), W'(ref_tff), "tff q after falling edge");
      expect_eq(cnt_count, ref_cnt, "count after falling edge");
      #2;
    end

    $display("latch follow=%0d hold=%0d | tff toggle=%0d keep=%0d | count up=%0d down=%0d hold=%0d | fredkin pass=%0d swap=%0d",
             n_follow, n_hold, n_toggle, n_keep, n_up, n_down, n_stay, n_pass, n_swap);
    checks++;
    if (n_follow == 0 || n_hold == 0 || n_toggle == 0 || n_keep == 0 ||
        n_up == 0 || n_down == 0 || n_stay == 0 || n_pass == 0 || n_swap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// terror_stage_tb: directed test of one Terror buffer.  A sender register
// launches words through a wire_segment (late on chosen words) and can play
// an upstream buffer that corrects itself: it sends a wrong word, then the
// right one, and raises prev_corr at ckdd of the wrong word's cycle.  A
// receiver model keeps the stage's word unless corr_out marks it.
//   T1 16 words, no late word: in order, latency 2 cycles, no error.
//   T2 16 words, words 4, 8, 12 late: one error only (delayed mode avoids
//      the rest), one corr_out pulse, all words right, 1 cycle penalty.
//   T3 after an idle gap the stage is back in normal mode.
//   T4 upstream correction while in normal mode: forwarded (one corr_out
//      pulse), the wrong word is dropped by the receiver.
//   T5 upstream correction while in delayed mode: absorbed (no corr_out),
//      the stage returns to normal mode, no word lost or repeated.
//   T6 40 random bursts of 1..20 words with random late words: all words
//      arrive in order and unchanged; a burst with a late word has exactly
//      one error and one corr_out pulse, and costs 1 cycle, or 0 cycles when
//      the only late word is the idle word just after the burst (the stale
//      copy of the last word is then dropped and nothing is delayed).
// The late flag queued with word k is sampled by the wire at the edge that
// launches word k+1, so late_at = k delays word k+1 (k = len-1: the idle word).
// Clocks: ck period 1000, ckd = ck + 500, ckdd = ck + 770.
module terror_stage_tb;
  localparam int W = terror_pkg::W_DEF;
  int checks = 0, failures = 0;
  logic ck = 1'b0, ckd, ckdd, rst_n = 1'b0;
  always #500 ck = ~ck;
  delay_chain #(.DLY(500)) u_ckd  (.in(ck), .out(ckd));
  delay_chain #(.DLY(770)) u_ckdd (.in(ck), .out(ckdd));

  logic [W:0] snd, arrive, q;
  logic       late, pc, bad_now, corr_out, sel, err;

  wire_segment #(.N(W+1)) u_seg (.ck, .src(snd), .late, .dst(arrive));
  terror_stage dut (.ck, .ckd, .ckdd, .rst_n, .d(arrive), .prev_corr(pc),
                             .q, .corr_out, .sel, .err);

  typedef struct { logic [W-1:0] wd; logic bad; logic late; } ent_t;
  ent_t         tx_q [$];
  logic [W-1:0] exp_q [$];
  int cyc = 0, first_tx = 0, last_rx = 0, n_rx = 0, n_bad = 0, n_corr = 0, n_err = 0;
  logic first_pend = 1'b0;

  always @(posedge ck) begin
    cyc <= cyc + 1;
    if (tx_q.size() != 0) begin
      automatic ent_t e = tx_q.pop_front();
      snd     <= {1'b1, e.wd};
      late    <= e.late;
      bad_now <= e.bad;
      if (first_pend) begin first_tx = cyc; first_pend = 1'b0; end
    end else begin
      snd     <= {1'b0, ~snd[W-1:0]};
      late    <= 1'b0;
      bad_now <= 1'b0;
    end
  end
  always @(posedge ckdd) pc <= bad_now;

  // receiver model and counters
  always @(posedge ck) if (rst_n) begin
    if (corr_out) n_corr++;
    if (q[W] && !corr_out) begin
      automatic logic [W-1:0] e = (exp_q.size() != 0) ? exp_q.pop_front() : ~q[W-1:0];
      n_rx++;
      last_rx = cyc;
      if (e !== q[W-1:0]) n_bad++;
    end
  end
  always @(posedge ckdd) if (rst_n && err) n_err++;

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, want);
    end
  endtask

  // queue a burst; late_at and bad_at are word indices
  task automatic burst(input int len, input int late_at [$], input int bad_at [$],
                       output int pen, output int rx, output int bad, output int crr, output int ers);
    int r0 = n_rx, b0 = n_bad, c0 = n_corr, e0 = n_err, nsent = 0;
    @(negedge ck);
    first_pend = 1'b1;
    for (int k = 0; k < len; k++) begin
      ent_t e;
      e.wd = $urandom; e.late = 1'b0; e.bad = 1'b0;
      foreach (late_at[i]) if (late_at[i] == k) e.late = 1'b1;
      foreach (bad_at[i])  if (bad_at[i] == k)  e.bad  = 1'b1;
      tx_q.push_back(e);
      if (!e.bad) begin exp_q.push_back(e.wd); nsent++; end
    end
    repeat (len + 12) @(negedge ck);
    pen = last_rx - first_tx - (len - 1) - 2;
    rx  = n_rx - r0;
    bad = n_bad - b0;
    crr = n_corr - c0;
    ers = n_err - e0;
  endtask

  initial begin
    #(6000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int pen, rx, bad, crr, ers;
    snd = '0; late = 1'b0; pc = 1'b0; bad_now = 1'b0;
    repeat (3) @(posedge ck);
    @(negedge ck);
    rst_n = 1'b1;
    repeat (2) @(negedge ck);
    // T1
    burst(16, '{}, '{}, pen, rx, bad, crr, ers);
    expect_eq("T1 received", rx, 16);  expect_eq("T1 wrong", bad, 0);
    expect_eq("T1 penalty", pen, 0);   expect_eq("T1 errors", ers, 0);
    // T2
    burst(16, '{4, 8, 12}, '{}, pen, rx, bad, crr, ers);
    expect_eq("T2 received", rx, 16);  expect_eq("T2 wrong", bad, 0);
    expect_eq("T2 penalty", pen, 1);   expect_eq("T2 errors", ers, 1);
    expect_eq("T2 corr pulses", crr, 1);
    // T3
    expect_eq("T3 sel after idle", int'(sel), 0);
    // T4: word 6 is a wrong copy, word 7 its correction
    burst(16, '{}, '{6}, pen, rx, bad, crr, ers);
    expect_eq("T4 received", rx, 15);  expect_eq("T4 wrong", bad, 0);
    expect_eq("T4 forwarded corr", crr, 1);
    // T5: own error on word 2 (delayed mode), upstream correction on word 9
    fork
      burst(16, '{2}, '{9}, pen, rx, bad, crr, ers);
      begin
        // sel must fall right after the absorbed correction
        automatic int seen = 0;
        repeat (14) begin
          @(posedge ck);
          if (pc) seen = 1;
          if (seen == 1 && !sel) seen = 2;
        end
        expect_eq("T5 returned to normal on prev_corr", seen, 2);
      end
    join
    expect_eq("T5 received", rx, 15);  expect_eq("T5 wrong", bad, 0);
    expect_eq("T5 errors", ers, 1);
    expect_eq("T5 corr pulses (own only)", crr, 1);
    // T6
    for (int n = 0; n < 40; n++) begin
      automatic int len = $urandom_range(1, 20);
      automatic int la [$];
      automatic int e_err, e_pen;
      for (int k = 0; k < len; k++) if ($urandom_range(99) < 8) la.push_back(k);
      e_err = (la.size() != 0) ? 1 : 0;
      e_pen = (la.size() != 0 && la[0] < len - 1) ? 1 : 0;
      burst(len, la, '{}, pen, rx, bad, crr, ers);
      expect_eq($sformatf("T6.%0d received", n), rx, len);
      expect_eq($sformatf("T6.%0d wrong", n), bad, 0);
      expect_eq($sformatf("T6.%0d errors", n), ers, e_err);
      expect_eq($sformatf("T6.%0d corr pulses", n), crr, e_err);
      expect_eq($sformatf("T6.%0d penalty", n), pen, e_pen);
      expect_eq($sformatf("T6.%0d sel after idle", n), int'(sel), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

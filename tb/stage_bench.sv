// stage_bench: directed test of one robust link buffer (scheme SCHEME) between
// a sender model and a receiver model.  The sender shows one word per cycle,
// holds it while the buffer's stall_out is 1, and gives its valid one cycle
// later; the receiver takes the buffer's word every cycle it does not stall
// and keeps it if the late valid says so.  A wire_segment in front of the
// buffer delivers chosen words late.
//   T1 burst of 20 flits, no late word: all delivered, penalty 0.
//   T2 burst of 20 flits, flits 6, 11 and 16 (from 0) late:
//      scheme 1: 3 errors flagged, exactly those 3 flits wrong, penalty 0;
//      scheme 2: 1 error (later ones are avoided in delayed mode), none
//                wrong, penalty 1;
//      scheme 3: 3 errors, none wrong, penalty 3.
//   T3 the stage must be back in normal mode after the burst.
//   T4 burst of 20 flits with a 4-cycle receiver stall: all delivered in
//      order; stall_out raised; delayed (and for scheme 2 auxiliary) mode seen.
//   T5 40 random bursts (1 to 30 flits, each flit late with probability 1/5,
//      every other burst with a random receiver stall): all flits delivered
//      in order; schemes 2 and 3 deliver no wrong flit, scheme 1 no more wrong
//      flits than errors.  Without a stall the exact costs hold: scheme 1
//      flags every late flit and loses no cycle; scheme 2 sees at most one
//      error per burst and loses one cycle for it; scheme 3 loses one cycle
//      per error.
// The wire model samples 'late' at the launch edge before the sender's update
// of that edge, so an entry k in late_at delays the word launched after flit
// k, i.e. flit k+1.
// Penalty = cycles between the sender taking the first flit and the receiver
// accepting the last one, minus the error-free value (len - 1 + 3).
module stage_bench #(
  parameter int W      = 32,
  parameter int SCHEME = 2
) (
  input  logic ck,
  input  logic ckd,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import terror_pkg::*;

  logic [W-1:0] sq, arrive, q;
  logic         sq_v, sv, stall_out, v_out, stall_in, err_out, late;
  link_mode_e   mode;

  wire_segment #(.N(W)) u_seg (.ck, .src(sq), .late, .dst(arrive));

  if (SCHEME == 1) begin : g_s1
    link_stage_s1 #(.W(W)) dut (.ck, .ckd, .rst_n, .d(arrive), .v_in(sv), .stall_out,
                                .q, .v_out, .stall_in, .err_out, .mode);
  end else if (SCHEME == 3) begin : g_s3
    link_stage_s3 #(.W(W)) dut (.ck, .ckd, .rst_n, .d(arrive), .v_in(sv), .stall_out,
                                .q, .v_out, .stall_in, .err_out, .mode);
  end else begin : g_s2
    link_stage_s2 #(.W(W)) dut (.ck, .ckd, .rst_n, .d(arrive), .v_in(sv), .stall_out,
                                .q, .v_out, .stall_in, .err_out, .mode);
  end

  // sender model
  logic [W-1:0] tx_q [$];
  int           late_at [$];     // indices (in the burst) of flits to deliver late
  int           cyc = 0, tx_idx = 0, last_tx = 0, first_tx = 0;
  always @(posedge ck) begin
    cyc <= cyc + 1;
    sv  <= sq_v;
    late <= 1'b0;
    if (!rst_n) begin
      sq_v <= 1'b0;
    end else if (!stall_out || !sq_v) begin
      if (tx_q.size() != 0) begin
        automatic logic [W-1:0] wd = tx_q.pop_front();
        sq     <= wd;
        sq_v   <= 1'b1;
        last_tx = cyc;
        if (tx_idx == 0) first_tx = cyc;
        foreach (late_at[i]) if (late_at[i] == tx_idx) late <= 1'b1;
        tx_idx++;
      end else begin
        sq   <= ~sq;       // an idle word that differs from the last flit
        sq_v <= 1'b0;
      end
    end
  end

  // receiver model
  logic [W-1:0] exp_q [$];
  logic [W-1:0] cap;
  logic         cap_ok;
  int           last_rx = 0, n_bad = 0, n_rx = 0, n_err = 0;
  logic         rx_stall_req;
  always @(posedge ck) begin
    if (rst_n && cap_ok && v_out) begin
      automatic logic [W-1:0] e = (exp_q.size() != 0) ? exp_q.pop_front() : ~cap;
      n_rx++;
      last_rx = cyc;
      if (e !== cap) n_bad++;
    end
    cap      <= q;
    cap_ok   <= rst_n && !stall_in;
    stall_in <= rx_stall_req;
    if (rst_n && err_out) n_err++;
  end

  int n_stall = 0, n_dly = 0, n_aux = 0;
  always @(posedge ck) if (rst_n) begin
    if (stall_out) n_stall++;
    if (mode == MODE_DELAYED) n_dly++;
    if (mode == MODE_AUX) n_aux++;
  end

  task automatic burst(input int len, input int stall_from, input int stall_len,
                       output int pen, output int errs, output int bad, output int rx);
    int e0 = n_err, b0 = n_bad, r0 = n_rx;
    tx_idx = 0;
    for (int k = 0; k < len; k++) begin
      automatic logic [W-1:0] wd = $urandom;
      tx_q.push_back(wd);
      exp_q.push_back(wd);
    end
    for (int c = 0; c < len + 30; c++) begin
      @(negedge ck);
      rx_stall_req = (c >= stall_from && c < stall_from + stall_len);
    end
    pen  = last_rx - first_tx - (len - 1) - 3;
    errs = n_err - e0;
    bad  = n_bad - b0;
    rx   = n_rx - r0;
  endtask

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL s%0d: %s = %0d, expected %0d", SCHEME, what, got, want);
    end
  endtask

  initial begin
    int pen, errs, bad, rx, n_late;
    checks = 0; failures = 0; done = 1'b0;
    rx_stall_req = 1'b0; stall_in = 1'b0; sq = '0; sq_v = 1'b0; sv = 1'b0; late = 1'b0;
    @(posedge rst_n);
    repeat (3) @(negedge ck);
    // T1
    burst(20, 1000, 0, pen, errs, bad, rx);
    expect_eq("T1 received", rx, 20);
    expect_eq("T1 wrong", bad, 0);
    expect_eq("T1 errors", errs, 0);
    expect_eq("T1 penalty", pen, 0);
    // T2
    late_at = '{5, 10, 15};
    burst(20, 1000, 0, pen, errs, bad, rx);
    late_at = '{};
    expect_eq("T2 received", rx, 20);
    if (SCHEME == 1) begin
      expect_eq("T2 errors", errs, 3);
      expect_eq("T2 wrong", bad, 3);
      expect_eq("T2 penalty", pen, 0);
    end else if (SCHEME == 2) begin
      expect_eq("T2 errors", errs, 1);
      expect_eq("T2 wrong", bad, 0);
      expect_eq("T2 penalty", pen, 1);
    end else begin
      expect_eq("T2 errors", errs, 3);
      expect_eq("T2 wrong", bad, 0);
      expect_eq("T2 penalty", pen, 3);
    end
    // T3
    expect_eq("T3 mode after burst", int'(mode), int'(MODE_NORMAL));
    // T4
    begin
      automatic int s0 = n_stall, d0 = n_dly, a0 = n_aux;
      burst(20, 8, 4, pen, errs, bad, rx);
      expect_eq("T4 received", rx, 20);
      expect_eq("T4 wrong", bad, 0);
      checks++; if (n_stall == s0) begin failures++; $display("FAIL s%0d: T4 no stall_out", SCHEME); end
      checks++; if (n_dly == d0)   begin failures++; $display("FAIL s%0d: T4 no delayed mode", SCHEME); end
      if (SCHEME == 2) begin
        checks++; if (n_aux == a0) begin failures++; $display("FAIL s2: T4 no auxiliary mode"); end
      end
    end
    // T5
    for (int b = 0; b < 40; b++) begin
      automatic int len = $urandom_range(1, 30);
      automatic bit stalled = b[0];
      late_at = '{};
      for (int k = 0; k < len; k++) if ($urandom_range(4) == 0) late_at.push_back(k);
      // the wire model reads 'late' at the edge before it is updated, so entry
      // k delays the word launched one cycle later: flit k+1, or the idle word
      // after the burst when k is the last flit
      n_late = 0;
      foreach (late_at[i]) if (late_at[i] < len - 1) n_late++;
      burst(len, stalled ? $urandom_range(0, len) : 1000, $urandom_range(1, 6), pen, errs, bad, rx);
      expect_eq($sformatf("T5.%0d received", b), rx, len);
      if (SCHEME == 1) begin
        checks++;
        if (bad > errs) begin failures++; $display("FAIL s1: T5.%0d %0d wrong flits, %0d flagged", b, bad, errs); end
      end else expect_eq($sformatf("T5.%0d wrong", b), bad, 0);
      if (!stalled) begin
        if (SCHEME == 1) begin
          expect_eq($sformatf("T5.%0d errors", b), errs, n_late);
          expect_eq($sformatf("T5.%0d penalty", b), pen, 0);
        end else if (SCHEME == 2) begin
          expect_eq($sformatf("T5.%0d errors", b), errs, n_late != 0 ? 1 : 0);
          expect_eq($sformatf("T5.%0d penalty", b), pen, errs);
        end else begin
          expect_eq($sformatf("T5.%0d penalty", b), pen, errs);
        end
      end
    end
    late_at = '{};
    done = 1'b1;
  end
endmodule

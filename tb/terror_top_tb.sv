// terror_top_tb: end-to-end test of terror_top at its default size (32-bit
// words, 4 buffers per link).  All wire segments are wire_segment models
// that deliver words late at random; ckd = ck + 500, ckdd = ck + 770 with a
// 1000 cycle.
//  * Terror link: bursts of words with idle gaps.  Words are late both at
//    random (probability set per burst) and through crosstalk: the Terror
//    segments model the worst switching pattern (a line switching against
//    both neighbours), and each burst's words differ from the previous word
//    in a random subset of bits whose size is set per burst, giving 0 to
//    roughly 30% data-dependent late words.  Every word must reach the output
//    once, in order, unchanged; a burst's last word may be late by at most B
//    cycles, and by none if no error occurred (an error on the idle word
//    after a burst delays no data, so 0 is allowed with errors too).
//  * Robust links (schemes 1, 2, 3): random offered load and random
//    back-pressure at the switch side.  Schemes 2 and 3 must deliver every
//    flit unchanged and in order; scheme 1 delivers every flit in order and
//    may corrupt one only when it flags an error.
// Every mechanism must occur at least once: Terror error, forwarded and
// absorbed correction, return to normal mode at the end of a burst, a word
// dropped by the receiver, a late word caused by crosstalk; for each robust link stall, delayed mode and a
// timing error; auxiliary mode on scheme 2.
module terror_top_tb;
  import terror_pkg::*;
  localparam int W = 32;
  localparam int B = 4;

  int checks = 0, failures = 0;
  logic ck = 1'b0, ckd, ckdd, rst_n = 1'b0;
  always #500 ck = ~ck;
  delay_chain #(.DLY(500)) u_ckd  (.in(ck), .out(ckd));
  delay_chain #(.DLY(770)) u_ckdd (.in(ck), .out(ckdd));

  logic               t_src_valid, t_out_valid, t_discarded;
  logic [W-1:0]       t_src_data, t_out_data;
  logic [W:0]         t_seg_launch [B], t_seg_arrive [B];
  logic [B-1:0]       t_sel, t_err, t_late;
  logic [2:0]         r_src_valid, r_src_ready, r_out_valid, r_out_ready, r_err;
  logic [W-1:0]       r_src_data [3], r_out_data [3];
  logic [W-1:0]       r_seg_launch [3][B], r_seg_arrive [3][B];
  logic [B-1:0]       r_stage_err [3], r_late [3];
  link_mode_e         r_mode [3][B];

  terror_top dut (.*);

  for (genvar i = 0; i < B; i++) begin : g_tseg
    wire_segment #(.N(W+1), .XTALK(1'b1)) u_seg (.ck, .src(t_seg_launch[i]), .late(t_late[i]), .dst(t_seg_arrive[i]));
  end
  for (genvar s = 0; s < 3; s++) begin : g_rs
    for (genvar i = 0; i < B; i++) begin : g_rseg
      wire_segment #(.N(W)) u_seg (.ck, .src(r_seg_launch[s][i]), .late(r_late[s][i]), .dst(r_seg_arrive[s][i]));
    end
  end

  int cyc = 0;
  always @(posedge ck) cyc <= cyc + 1;

  // ---------------- Terror link ----------------
  logic [W-1:0] t_exp [$];
  int t_last_rx = 0, t_err_n = 0, t_fwd = 0, t_abs = 0, t_idle = 0, t_drop = 0, t_p_late = 0;
  int t_xtalk = 0;
  logic [W:0] seg0_prev = '0;
  // same pattern test as the wire model: a line switching against both neighbours
  function automatic bit adversarial(input logic [W:0] a, input logic [W:0] b);
    for (int i = 1; i < W; i++)
      if ((a[i] != a[i-1]) && (a[i] != a[i+1]) && (b[i+1-:3] == ~a[i+1-:3])) return 1'b1;
    return 1'b0;
  endfunction
  always @(posedge ck) begin
    #1;
    if (rst_n && adversarial(seg0_prev, t_seg_launch[0])) t_xtalk++;
    seg0_prev = t_seg_launch[0];
  end
  logic [B-1:0] sel_d = '0, corr_d = '0;
  always @(posedge ck) if (rst_n) begin
    for (int i = 0; i < B; i++) t_late[i] <= ($urandom_range(999) < t_p_late);
    if (t_out_valid) begin
      checks++;
      t_last_rx = cyc;
      if (t_exp.size() == 0 || t_exp.pop_front() !== t_out_data) begin
        failures++; $display("FAIL: Terror link word %h out of order or wrong", t_out_data);
      end
    end
    if (t_discarded) t_drop++;
    for (int i = 0; i < B; i++) if (sel_d[i] && !t_sel[i] && !corr_d[i]) t_idle++;
    sel_d  <= t_sel;
    corr_d <= dut.u_tlink.corr[B-1:0];
  end
  always @(posedge ckdd) if (rst_n) begin
    t_err_n += $countones(t_err);
    for (int i = 1; i < B; i++) if (dut.u_tlink.corr[i]) begin
      if (t_sel[i]) t_abs++; else t_fwd++;
    end
  end

  // ---------------- robust links ----------------
  logic [W-1:0] r_exp [3][$];
  int r_bad [3], r_errn [3], r_stall [3], r_dly [3], r_aux [3], r_rx [3];
  int r_p_late = 100;
  logic [2:0] r_taken = '0;
  initial for (int s = 0; s < 3; s++) begin
    r_bad[s] = 0; r_errn[s] = 0; r_stall[s] = 0; r_dly[s] = 0; r_aux[s] = 0; r_rx[s] = 0;
  end
  always @(posedge ck) if (rst_n) begin
    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < B; i++) r_late[s][i] <= ($urandom_range(999) < r_p_late);
      if (r_src_valid[s] && r_src_ready[s]) r_exp[s].push_back(r_src_data[s]);
      r_taken[s] <= r_src_valid[s] && r_src_ready[s];
      if (r_out_valid[s] && r_out_ready[s]) begin
        automatic logic [W-1:0] e = (r_exp[s].size() != 0) ? r_exp[s].pop_front() : ~r_out_data[s];
        checks++;
        r_rx[s]++;
        if (e !== r_out_data[s]) begin
          r_bad[s]++;
          if (s != 0) begin failures++; $display("FAIL: scheme %0d flit %h, expected %h", s + 1, r_out_data[s], e); end
        end
      end
      r_errn[s] += $countones(r_stage_err[s]);
      if (r_src_valid[s] && !r_src_ready[s]) r_stall[s]++;
      for (int i = 0; i < B; i++) begin
        if (r_mode[s][i] == MODE_DELAYED) r_dly[s]++;
        if (r_mode[s][i] == MODE_AUX)     r_aux[s]++;
      end
    end
  end

  bit r_run = 1'b0;
  always @(negedge ck) begin
    for (int s = 0; s < 3; s++) begin
      if (!r_src_valid[s] || r_taken[s]) begin
        r_src_valid[s] = r_run && ($urandom_range(9) < 7);
        r_src_data[s]  = $urandom;
      end
      r_out_ready[s] = !r_run || ($urandom_range(9) < 6);
    end
  end

  task automatic req(input string what, input int cnt);
    checks++;
    if (cnt == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    #(20000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int len, first_tx, e0, pen, p_flip;
    logic [W-1:0] word, flip;
    t_src_valid = 1'b0; t_src_data = '0; t_late = '0;
    r_src_valid = '0; r_out_ready = '1;
    foreach (r_late[s]) r_late[s] = '0;
    repeat (3) @(posedge ck);
    @(negedge ck);
    rst_n = 1'b1;
    r_run = 1'b1;
    word = '0;
    for (int b = 0; b < 64; b++) begin
      len      = $urandom_range(1, 40);
      t_p_late = (b % 4 == 0) ? 0 : (b % 4 == 1) ? 20 : (b % 4 == 2) ? 100 : 300;
      p_flip   = 50 + 100 * ((b / 4) % 4);   // per mille per bit
      e0       = t_err_n;
      @(negedge ck);
      first_tx = cyc + 1;          // registered at the coming edge
      for (int k = 0; k < len; k++) begin
        t_src_valid = 1'b1;
        flip = '0;
        for (int j = 0; j < W; j++) flip[j] = ($urandom_range(999) < p_flip);
        word        = word ^ flip;
        t_src_data  = word;
        t_exp.push_back(t_src_data);
        @(negedge ck);
      end
      t_src_valid = 1'b0;
      t_p_late = 0;
      repeat (2 * B + 6) @(negedge ck);
      // launch register at first_tx, B buffers, receiver register
      pen = t_last_rx - first_tx - (len - 1) - (B + 1);
      checks++;
      if (t_exp.size() != 0) begin
        failures++; $display("FAIL: Terror burst %0d lost %0d words", b, t_exp.size());
        t_exp.delete();
      end else if (t_err_n == e0 && pen != 0) begin
        failures++; $display("FAIL: Terror burst %0d penalty %0d without errors", b, pen);
      end else if (t_err_n != e0 && (pen < 0 || pen > B)) begin
        failures++; $display("FAIL: Terror burst %0d penalty %0d outside 0..%0d", b, pen, B);
      end
    end
    // drain the robust links
    r_run = 1'b0;
    r_p_late = 0;
    repeat (40) @(negedge ck);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (r_exp[s].size() != 0) begin
        failures++; $display("FAIL: scheme %0d lost %0d flits", s + 1, r_exp[s].size());
      end
    end
    checks++;
    if (r_bad[0] > r_errn[0]) begin failures++; $display("FAIL: scheme 1 wrong flits not flagged"); end
    $display("Terror link: errors=%0d forwarded=%0d absorbed=%0d idle_returns=%0d dropped=%0d crosstalk_late=%0d",
             t_err_n, t_fwd, t_abs, t_idle, t_drop, t_xtalk);
    for (int s = 0; s < 3; s++)
      $display("scheme %0d: flits=%0d errors=%0d wrong=%0d stall=%0d delayed=%0d aux=%0d",
               s + 1, r_rx[s], r_errn[s], r_bad[s], r_stall[s], r_dly[s], r_aux[s]);
    req("Terror timing error", t_err_n);
    req("forwarded correction", t_fwd);
    req("absorbed correction", t_abs);
    req("return to normal mode at end of burst", t_idle);
    req("receiver dropping a corrected word", t_drop);
    req("word made late by crosstalk", t_xtalk);
    for (int s = 0; s < 3; s++) begin
      req($sformatf("scheme %0d stall", s + 1), r_stall[s]);
      req($sformatf("scheme %0d delayed mode", s + 1), r_dly[s]);
      req($sformatf("scheme %0d timing error", s + 1), r_errn[s]);
    end
    req("scheme 2 auxiliary mode", r_aux[1]);
    req("scheme 1 corrupted flit flagged", r_bad[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// terror_workload_tb: latency measurements on terror_top at its default size
// (32-bit words, 4 buffers per link), for the transfer sizes and error rates
// the links are meant for.  Wire segments are wire_segment models; in every
// cycle each segment delivers its word late with probability RATE (0, 1% or
// 5%).  ckd = ck + 500, ckdd = ck + 770 with a 1000 cycle.
//  * Terror link: 1000-bit transfers (32 words of 32 bits, the last one
//    partly used), 40 per error rate, back to back after a drain.  The latency
//    of a transfer is the cycles from its first word entering the launch
//    register to its last word leaving the receiver.  Every word must arrive
//    in order, unchanged, and the penalty against the error-free latency must
//    be between 0 and B cycles.
//  * Robust links (schemes 1, 2, 3 side by side, same schedule): 1000 flits
//    per run, for two traffic classes: continuous (one flit every cycle) and
//    uniform (each flit released at a random time, 60% average load), with
//    the switch always ready.  The penalty of a run is its completion time
//    minus that of the error-free run with the same schedule.  Schemes 2 and 3
//    must deliver every flit unchanged and in order and the penalty must not
//    exceed the number of errors; with continuous traffic scheme 2's penalty
//    must not exceed B (after its first error a buffer stays in delayed
//    mode).  Scheme 1 must deliver every flit in order and corrupt one only
//    when it flags an error.
// Results are printed per error rate: completion time and mean flit latency
// (delivery minus release cycle), each with its increase over the error-free
// run.  Scheme 1 shows no penalty because it leaves correction to a
// retransmission layer that is not part of the link.
module terror_workload_tb;
  import terror_pkg::*;
  localparam int W      = W_DEF;
  localparam int B      = B_DEF;
  localparam int NWORD  = (1000 + W - 1) / W;
  localparam int NFLIT  = 1000;
  localparam int NXFER  = 40;

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
    wire_segment #(.N(W+1)) u_seg (.ck, .src(t_seg_launch[i]), .late(t_late[i]), .dst(t_seg_arrive[i]));
  end
  for (genvar s = 0; s < 3; s++) begin : g_rs
    for (genvar i = 0; i < B; i++) begin : g_rseg
      wire_segment #(.N(W)) u_seg (.ck, .src(r_seg_launch[s][i]), .late(r_late[s][i]), .dst(r_seg_arrive[s][i]));
    end
  end

  int cyc = 0;
  int rate = 0;                       // late probability, per mille
  always @(posedge ck) begin
    cyc <= cyc + 1;
    for (int i = 0; i < B; i++) t_late[i] <= rst_n && ($urandom_range(999) < rate);
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < B; i++) r_late[s][i] <= rst_n && ($urandom_range(999) < rate);
  end

  // ---------------- Terror link receiver side ----------------
  logic [W-1:0] t_exp [$];
  int t_last_rx = 0, t_errs = 0;
  always @(posedge ck) if (rst_n && t_out_valid) begin
    checks++;
    t_last_rx = cyc;
    if (t_exp.size() == 0 || t_exp.pop_front() !== t_out_data) begin
      failures++; $display("FAIL: Terror link word %h out of order or wrong", t_out_data);
    end
  end
  always @(posedge ckdd) if (rst_n) t_errs += $countones(t_err);

  // ---------------- robust links ----------------
  int           sched [NFLIT];        // earliest release cycle of flit k (relative)
  int           r_start = 0;
  bit           r_run = 1'b0;
  int           idx [3], nrx [3], last_rx [3], nerr [3], nbad [3];
  int           lat_sum [3];             // sum over flits of delivery - release cycle
  logic [W-1:0] r_exp [3][$];

  always @(posedge ck) if (rst_n) begin
    for (int s = 0; s < 3; s++) begin
      if (r_src_valid[s] && r_src_ready[s]) begin
        r_exp[s].push_back(r_src_data[s]);
        idx[s]++;
      end
      if (r_out_valid[s]) begin
        automatic logic [W-1:0] e = (r_exp[s].size() != 0) ? r_exp[s].pop_front() : ~r_out_data[s];
        checks++;
        if (nrx[s] < NFLIT) lat_sum[s] += cyc - r_start - sched[nrx[s]];
        nrx[s]++;
        last_rx[s] = cyc;
        if (e !== r_out_data[s]) begin
          nbad[s]++;
          if (s != 0) begin failures++; $display("FAIL: scheme %0d flit %h, expected %h", s + 1, r_out_data[s], e); end
        end
      end
      nerr[s] += $countones(r_stage_err[s]);
    end
  end
  always @(negedge ck) begin
    for (int s = 0; s < 3; s++) begin
      r_src_valid[s] = r_run && idx[s] < NFLIT && (cyc >= r_start + sched[idx[s]]);
      r_src_data[s]  = {idx[s][15:0], 16'(idx[s] * 40503)};
    end
  end

  task automatic robust_run(output int t [3], output real ml [3]);
    for (int s = 0; s < 3; s++) begin
      idx[s] = 0; nrx[s] = 0; nerr[s] = 0; nbad[s] = 0; last_rx[s] = 0; lat_sum[s] = 0;
    end
    @(negedge ck);
    r_start = cyc + 1;
    r_run   = 1'b1;
    wait (idx[0] == NFLIT && idx[1] == NFLIT && idx[2] == NFLIT);
    r_run = 1'b0;
    repeat (4 * B + 10) @(negedge ck);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (nrx[s] != NFLIT || r_exp[s].size() != 0) begin
        failures++; $display("FAIL: scheme %0d delivered %0d of %0d flits", s + 1, nrx[s], NFLIT);
        r_exp[s].delete();
      end
      t[s] = last_rx[s] - r_start + 1;
      ml[s] = real'(lat_sum[s]) / NFLIT;
    end
    checks++;
    if (nbad[0] > nerr[0]) begin failures++; $display("FAIL: scheme 1 wrong flits not flagged"); end
  endtask

  initial begin
    #(400000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int rates [3] = '{0, 10, 50};
  initial begin
    int first_tx, lat, lat0, e0, pen, pen_max, pen_sum;
    int t [3], t0 [3];
    real ml [3], ml0 [3];
    t_src_valid = 1'b0; t_src_data = '0; t_late = '0;
    r_src_valid = '0; r_out_ready = '1;
    foreach (r_late[s]) r_late[s] = '0;
    for (int s = 0; s < 3; s++) idx[s] = 0;
    repeat (3) @(posedge ck);
    @(negedge ck);
    rst_n = 1'b1;

    // ---- Terror link: 1000-bit transfers ----
    lat0 = 0;
    foreach (rates[r]) begin
      rate = rates[r];
      pen_max = 0; pen_sum = 0;
      for (int x = 0; x < NXFER; x++) begin
        e0 = t_errs;
        @(negedge ck);
        first_tx = cyc + 1;
        for (int k = 0; k < NWORD; k++) begin
          t_src_valid = 1'b1;
          t_src_data  = $urandom;
          t_exp.push_back(t_src_data);
          @(negedge ck);
        end
        t_src_valid = 1'b0;
        repeat (2 * B + 6) @(negedge ck);
        lat = t_last_rx - first_tx + 1;
        if (r == 0 && x == 0) lat0 = lat;
        pen = lat - lat0;
        checks++;
        if (t_exp.size() != 0) begin
          failures++; $display("FAIL: Terror transfer lost %0d words", t_exp.size());
          t_exp.delete();
        end else if ((t_errs == e0 && pen != 0) || pen < 0 || pen > B) begin
          failures++; $display("FAIL: Terror transfer penalty %0d with %0d errors", pen, t_errs - e0);
        end
        pen_sum += pen;
        if (pen > pen_max) pen_max = pen;
      end
      $display("Terror link, 1000-bit transfers, late rate %0d.%0d%%: latency %0d cycles error-free, mean penalty %0.2f cycles (%0.1f%%), max %0d",
               rate / 10, rate % 10, lat0, real'(pen_sum) / NXFER, 100.0 * pen_sum / NXFER / lat0, pen_max);
    end
    rate = 0;

    // ---- robust links: 1000 flits, continuous and uniform traffic ----
    for (int cls = 0; cls < 2; cls++) begin
      if (cls == 0) for (int k = 0; k < NFLIT; k++) sched[k] = k;
      else begin
        sched[0] = 0;
        for (int k = 1; k < NFLIT; k++) sched[k] = sched[k-1] + (($urandom_range(99) < 60) ? 1 : $urandom_range(2, 3));
      end
      foreach (rates[r]) begin
        rate = rates[r];
        robust_run(t, ml);
        rate = 0;
        if (r == 0) begin t0 = t; ml0 = ml; end
        for (int s = 0; s < 3; s++) begin
          pen = t[s] - t0[s];
          $display("%s traffic, late rate %0d.%0d%%, scheme %0d: %0d cycles, errors %0d, penalty %0d cycles (%0.2f%%), mean flit latency %0.2f (+%0.1f%%)%s",
                   cls == 0 ? "continuous" : "uniform", rates[r] / 10, rates[r] % 10, s + 1, t[s], nerr[s],
                   pen, 100.0 * pen / t0[s], ml[s], 100.0 * (ml[s] - ml0[s]) / ml0[s],
                   s == 0 ? $sformatf(", wrong flits %0d", nbad[0]) : "");
          if (s != 0) begin
            checks++;
            if (pen < 0 || pen > nerr[s]) begin
              failures++; $display("FAIL: scheme %0d penalty %0d with %0d errors", s + 1, pen, nerr[s]);
            end
          end
        end
        if (cls == 0) begin
          checks++;
          if (t[1] - t0[1] > B) begin
            failures++; $display("FAIL: scheme 2 continuous-traffic penalty %0d above %0d", t[1] - t0[1], B);
          end
        end
        if (rates[r] == 50) begin
          for (int s = 0; s < 3; s++) begin
            checks++;
            if (nerr[s] == 0) begin failures++; $display("FAIL: scheme %0d saw no error at 5%%", s + 1); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

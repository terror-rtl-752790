// terror_link_tb: end-to-end test of a B-stage Terror link with random
// timing errors on its wire segments.
//
// A sender register launches bursts of random words (valid line set) with
// idle gaps; every segment delivers a word late with a per-burst probability.
// A receiver model next to the last stage keeps a word unless the correction
// line marks it.  Checks: every word arrives once, in order, unchanged; a
// burst without errors has the ideal latency (B+1 cycles for its last word);
// a burst with errors is late by at most B cycles (possibly 0: an error on
// the idle word after a burst only removes a duplicate of the last word).  The test
// also requires at least one forwarded and one absorbed correction and one
// return from delayed to normal mode at the end of a burst.
module terror_link_tb;
  localparam int W = terror_pkg::W_DEF;
  localparam int B = terror_pkg::B_DEF;
  localparam int NBURST = 60;

  int checks = 0, failures = 0;
  logic ck = 1'b0, ckd, ckdd, rst_n = 1'b0;
  always #500 ck = ~ck;
  delay_chain #(.DLY(500)) u_ckd  (.in(ck), .out(ckd));
  delay_chain #(.DLY(770)) u_ckdd (.in(ck), .out(ckdd));

  logic [W:0]   launch [B];
  logic [W:0]   arrive [B];
  logic [W:0]   seg_tx [B];
  logic [B-1:0] late, sel, err;
  logic         corr_out;
  logic [W:0]   snd;

  for (genvar i = 0; i < B; i++) begin : g_seg
    wire_segment #(.N(W+1)) u_seg (.ck, .src(launch[i]), .late(late[i]), .dst(arrive[i]));
    if (i == 0) begin : g_first
      assign launch[0] = snd;
    end else begin : g_next
      assign launch[i] = seg_tx[i-1];
    end
  end

  terror_link dut (
    .ck, .ckd, .ckdd, .rst_n, .seg_rx(arrive), .seg_tx, .corr_in(1'b0),
    .corr_out, .sel, .err);

  // reference queue of sent words
  logic [W-1:0] exp_q [$];
  int cyc = 0;
  always @(posedge ck) cyc <= cyc + 1;

  // receiver model
  int last_rx_cyc = 0, nrx = 0;
  always @(posedge ck) if (rst_n && seg_tx[B-1][W] && !corr_out) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected word %h", seg_tx[B-1][W-1:0]);
    end else begin
      automatic logic [W-1:0] e = exp_q.pop_front();
      if (e !== seg_tx[B-1][W-1:0]) begin
        failures++; $display("FAIL: got %h expected %h", seg_tx[B-1][W-1:0], e);
      end
    end
    last_rx_cyc = cyc;
    nrx++;
  end

  // mechanism counters, sampled at ckdd
  int n_err = 0, n_fwd = 0, n_abs = 0, n_idle_ret = 0;
  always @(posedge ckdd) if (rst_n) begin
    for (int i = 0; i < B; i++) begin
      if (err[i]) n_err++;
      if (dut.corr[i] && i > 0) begin
        if (sel[i]) n_abs++; else n_fwd++;
      end
    end
  end

  // a stage that leaves delayed mode without a correction on its prev_corr
  // line returned because its transfer ended
  logic [B-1:0] sel_d, corr_d;
  always @(posedge ck) begin
    for (int i = 0; i < B; i++)
      if (rst_n && sel_d[i] && !sel[i] && !corr_d[i]) n_idle_ret++;
    sel_d  <= sel;
    corr_d <= dut.corr[B-1:0];
  end

  int p_late;  // per mille
  always @(posedge ck) for (int i = 0; i < B; i++) late[i] <= ($urandom_range(999) < p_late);

  initial begin
    #(4000 * 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, send_cyc, err0, pen;
    snd = '0; late = '0; p_late = 0;
    repeat (3) @(posedge ck);
    @(negedge ck);
    rst_n = 1'b1;
    repeat (2) @(posedge ck);
    for (int b = 0; b < NBURST; b++) begin
      len    = $urandom_range(1, 48);
      p_late = (b % 4 == 0) ? 0 : (b % 4 == 1) ? 20 : (b % 4 == 2) ? 100 : 300;
      err0   = n_err;
      for (int k = 0; k < len; k++) begin
        automatic logic [W-1:0] wd = $urandom;
        @(negedge ck);
        snd = {1'b1, wd};
        exp_q.push_back(wd);
        @(posedge ck);
        send_cyc = cyc;  // launched at this edge
      end
      @(negedge ck);
      snd = {1'b0, W'($urandom)};
      p_late = 0;
      repeat (2 * B + 4) @(posedge ck);
      // last word launched at edge send_cyc; ideal capture by the receiver B+1 edges later
      pen = last_rx_cyc - (send_cyc + B + 1);
      checks++;
      if (exp_q.size() != 0) begin
        failures++; $display("FAIL: burst %0d lost %0d words", b, exp_q.size());
        exp_q.delete();
      end else if (n_err == err0 && pen != 0) begin
        failures++; $display("FAIL: burst %0d without errors has penalty %0d", b, pen);
      end else if (n_err != err0 && (pen < 0 || pen > B)) begin
        failures++; $display("FAIL: burst %0d penalty %0d outside 0..%0d", b, pen, B);
      end
      if (sel != '0) begin
        failures++; $display("FAIL: stages still in delayed mode after idle");
      end
    end
    $display("errors=%0d forwarded=%0d absorbed=%0d idle_returns=%0d words=%0d",
             n_err, n_fwd, n_abs, n_idle_ret, nrx);
    checks++; if (n_err == 0)      begin failures++; $display("FAIL: no timing error"); end
    checks++; if (n_fwd == 0)      begin failures++; $display("FAIL: no forwarded correction"); end
    checks++; if (n_abs == 0)      begin failures++; $display("FAIL: no absorbed correction"); end
    checks++; if (n_idle_ret == 0) begin failures++; $display("FAIL: no return on idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

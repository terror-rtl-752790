// terror_ckd_sweep_tb: how the ck-to-ckd delay decides which timing errors
// the Terror link corrects.  Five Terror links (launch register, terror_link
// with 4 buffers, terror_receiver; 32-bit words) run side by side on the same
// words and the same wire delays, with ckd delayed by 100, 200, 300, 400 and
// 500 ps from ck (10% to 50% of a 1000 ps cycle) and ckdd 270 ps after ckd.
// Wire segments are wire_segment_var models; in every cycle each segment is
// late with probability 5%, by a random class of 150 to 450 ps beyond the
// next ck edge.  A late word is corrected when it still beats ckd; otherwise
// it is lost: the flops keep the previous word, which goes on as a stale
// copy, and with 1000-bit transfers (32 words) the whole transfer would have
// to be sent again.
// Each word carries its sequence number.  For each link the testbench counts
// corrected errors, words delivered correctly, words lost, transfers with a
// loss, and the mean latency penalty of the complete transfers.
// Checks: with ckd at 50% no word is lost, no wrong word is delivered and
// every transfer's penalty lies in 0..B; the number of lost words never
// grows as ckd moves later; with ckd at 10% some words are lost (the sweep
// covers both regions).  Stale words are only reported: a late idle word
// after a transfer also leaves a stale copy of the last word.
module terror_ckd_sweep_tb;
  import terror_pkg::*;
  localparam int W     = W_DEF;
  localparam int B     = B_DEF;
  localparam int NL    = 5;
  localparam int NWORD = (1000 + W - 1) / W;
  localparam int NXFER = 80;

  int checks = 0, failures = 0;
  logic ck = 1'b0, rst_n = 1'b0;
  always #500 ck = ~ck;

  logic [W:0]   snd;                  // shared launch register (bit W = valid)
  logic         src_valid = 1'b0;
  logic [W-1:0] src_data  = '0;
  logic [2:0]   lateness [B];
  int           rate = 0;             // per mille
  int           cyc  = 0;

  always @(posedge ck or negedge rst_n)
    if (!rst_n) snd <= '0;
    else        snd <= {src_valid, src_data};

  always @(posedge ck) begin
    cyc <= cyc + 1;
    for (int i = 0; i < B; i++)
      lateness[i] <= (rst_n && $urandom_range(999) < rate) ? 3'($urandom_range(1, 4)) : 3'd0;
  end

  logic [W-1:0] sent [int];           // by sequence number
  int           nsent = 0;
  bit           got  [NL][int];
  int           ncorrect [NL], nerr [NL], nbad [NL], last_rx [NL];

  for (genvar k = 0; k < NL; k++) begin : g_l
    logic ckd, ckdd, out_valid, discarded, corr;
    logic [W:0]   seg_rx [B], seg_tx [B], launch [B];
    logic [W-1:0] out_data;
    logic [B-1:0] sel, err;
    delay_chain #(.DLY(100 * (k + 1)))       u_ckd  (.in(ck), .out(ckd));
    delay_chain #(.DLY(100 * (k + 1) + 270)) u_ckdd (.in(ck), .out(ckdd));
    always_comb begin
      launch[0] = snd;
      for (int i = 1; i < B; i++) launch[i] = seg_tx[i-1];
    end
    for (genvar i = 0; i < B; i++) begin : g_seg
      wire_segment_var #(.N(W+1)) u_seg (.ck, .src(launch[i]), .lateness(lateness[i]), .dst(seg_rx[i]));
    end
    terror_link u_link (.ck, .ckd, .ckdd, .rst_n, .seg_rx, .seg_tx, .corr_in(1'b0),
                        .corr_out(corr), .sel, .err);
    terror_receiver u_rx (.ck, .rst_n, .d(seg_tx[B-1]), .prev_corr(corr),
                          .out_valid, .out_data, .discarded);
    always @(posedge ck) if (rst_n && out_valid) begin
      automatic int seq = int'(out_data[W-1:W-16]);
      last_rx[k] = cyc;
      if (sent.exists(seq) && sent[seq] == out_data && !got[k].exists(seq)) begin
        got[k][seq] = 1'b1;
        ncorrect[k]++;
      end else nbad[k]++;
    end
    always @(posedge ckdd) if (rst_n) nerr[k] += $countones(err);
  end

  initial begin
    #(200000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int first_tx, base, pen;
    int c0 [NL], lost [NL], xlost [NL], pen_sum [NL], nfull [NL];
    for (int k = 0; k < NL; k++) begin
      ncorrect[k] = 0; nerr[k] = 0; nbad[k] = 0; last_rx[k] = 0;
      lost[k] = 0; xlost[k] = 0; pen_sum[k] = 0; nfull[k] = 0;
    end
    for (int i = 0; i < B; i++) lateness[i] = 3'd0;
    repeat (3) @(posedge ck);
    @(negedge ck);
    rst_n = 1'b1;
    rate  = 50;
    for (int x = 0; x < NXFER; x++) begin
      for (int k = 0; k < NL; k++) c0[k] = ncorrect[k];
      base = nsent;
      @(negedge ck);
      first_tx = cyc + 1;
      for (int j = 0; j < NWORD; j++) begin
        src_valid = 1'b1;
        src_data  = {16'(nsent), 16'($urandom)};
        sent[nsent] = src_data;
        nsent++;
        @(negedge ck);
      end
      src_valid = 1'b0;
      repeat (2 * B + 6) @(negedge ck);
      for (int k = 0; k < NL; k++) begin
        if (ncorrect[k] - c0[k] != NWORD) begin
          xlost[k]++;
          lost[k] += NWORD - (ncorrect[k] - c0[k]);
        end else begin
          pen = last_rx[k] - first_tx - (NWORD - 1) - (B + 1);
          pen_sum[k] += pen;
          nfull[k]++;
          if (k == NL - 1) begin
            checks++;
            if (pen < 0 || pen > B) begin
              failures++; $display("FAIL: ckd 50%%: transfer %0d penalty %0d", x, pen);
            end
          end
        end
      end
    end
    for (int k = 0; k < NL; k++)
      $display("ckd %0d%% of cycle: corrected errors %0d, words lost %0d of %0d, stale words %0d, transfers with a loss %0d of %0d, mean penalty of complete transfers %0.2f cycles",
               10 * (k + 1), nerr[k], lost[k], nsent, nbad[k], xlost[k], NXFER,
               nfull[k] != 0 ? real'(pen_sum[k]) / nfull[k] : 0.0);
    for (int k = 0; k < NL; k++) begin
      if (k > 0) begin
        checks++;
        if (lost[k] > lost[k-1]) begin
          failures++; $display("FAIL: more words lost at ckd %0d%% than at %0d%%", 10 * (k + 1), 10 * k);
        end
      end
    end
    checks += 2;
    if (lost[NL-1] != 0 || nbad[NL-1] != 0) begin failures++; $display("FAIL: words lost or wrong with ckd at 50%%"); end
    if (lost[0] == 0)    begin failures++; $display("FAIL: no word lost with ckd at 10%%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

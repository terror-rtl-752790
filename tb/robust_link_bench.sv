// robust_link_bench: test harness for one robust link of a given scheme.
// Builds sender -> wire segments -> robust_link -> receiver, with the wire
// segments delivering words late at random, and checks the flits that leave
// the receiver against the flits given to the sender.
//   Phase A: random offered load and random back-pressure at the receiver.
//     Schemes 2 and 3 must deliver every flit once, in order, unchanged.
//     Scheme 1 must deliver every flit once, in order; a flit may be wrong
//     only if an error was flagged, and never more wrong flits than flags.
//   Phase B: back-to-back bursts, no back-pressure.  Extra latency of the
//     last flit of a burst over the error-free value (len-1+B+2 cycles after
//     the sender took the first flit): 0 without errors; scheme 2: 1..B with errors;
//     scheme 3: 1..(number of errors); scheme 1: always 0.
// Counts how often stall, delayed mode, auxiliary mode (scheme 2) and timing
// errors happened; the caller requires each of them.
module robust_link_bench #(
  parameter int W      = 32,
  parameter int B      = 4,
  parameter int SCHEME = 2,
  parameter int NA     = 1500,   // cycles of phase A
  parameter int NB     = 12      // bursts of phase B
) (
  input  logic ck,
  input  logic ckd,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_err,
  output int   n_stall,
  output int   n_delayed,
  output int   n_aux,
  output logic done
);
  import terror_pkg::*;

  logic         src_valid, src_ready, out_valid, out_ready;
  logic [W-1:0] src_data, out_data, snd_q;
  logic         snd_v, snd_stall, lk_v, rx_stall, err_out;
  logic [W-1:0] launch [B], arrive [B], seg_tx [B];
  logic [B-1:0] late, err;
  link_mode_e   mode [B];

  link_sender #(.W(W)) u_snd (
    .ck, .rst_n, .src_valid, .src_data, .src_ready,
    .q(snd_q), .v_out(snd_v), .stall_in(snd_stall));

  for (genvar i = 0; i < B; i++) begin : g_seg
    wire_segment #(.N(W)) u_seg (.ck, .src(launch[i]), .late(late[i]), .dst(arrive[i]));
    if (i == 0) begin : g_first
      assign launch[0] = snd_q;
    end else begin : g_next
      assign launch[i] = seg_tx[i-1];
    end
  end

  robust_link #(.W(W), .B(B), .SCHEME(SCHEME)) dut (
    .ck, .ckd, .rst_n, .seg_rx(arrive), .seg_tx, .v_in(snd_v), .stall_out(snd_stall),
    .v_out(lk_v), .stall_in(rx_stall), .err_out, .err, .mode);

  link_receiver #(.W(W)) u_rx (
    .ck, .rst_n, .d(seg_tx[B-1]), .v_in(lk_v), .stall_out(rx_stall),
    .out_valid, .out_data, .out_ready);

  logic [W-1:0] exp_q [$];

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] r = '0;
    for (int j = 0; j < W; j += 32) r = (r << 32) | W'($urandom);
    return r;
  endfunction
  int cyc = 0, last_rx = 0, last_tx = 0, first_tx = 0, n_bad = 0;
  logic first_pend = 1'b0;
  always @(posedge ck) cyc <= cyc + 1;

  // sender side bookkeeping
  logic taken = 1'b0;
  always @(posedge ck) taken <= rst_n && src_valid && src_ready;
  always @(posedge ck) if (rst_n && src_valid && src_ready) begin
    exp_q.push_back(src_data);
    last_tx = cyc;
    if (first_pend) begin first_tx = cyc; first_pend = 1'b0; end
  end

  // receiver side check
  always @(posedge ck) if (rst_n && out_valid && out_ready) begin
    checks++;
    last_rx = cyc;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL s%0d: unexpected flit %h", SCHEME, out_data);
    end else begin
      automatic logic [W-1:0] e = exp_q.pop_front();
      if (e !== out_data) begin
        n_bad++;
        if (SCHEME != 1) begin
          failures++; $display("FAIL s%0d: got %h expected %h", SCHEME, out_data, e);
        end
      end
    end
  end

  // mechanism counters
  always @(posedge ck) if (rst_n) begin
    n_err += $countones(err);
    if (snd_stall) n_stall++;
    for (int i = 0; i < B; i++) begin
      if (mode[i] == MODE_DELAYED) n_delayed++;
      if (mode[i] == MODE_AUX)     n_aux++;
    end
  end

  int p_late, p_src, p_rdy;   // per mille
  always @(posedge ck) begin
    for (int i = 0; i < B; i++) late[i] <= ($urandom_range(999) < p_late);
  end

  initial begin
    int err0, pen;
    checks = 0; failures = 0; n_err = 0; n_stall = 0; n_delayed = 0; n_aux = 0;
    done = 1'b0; late = '0;
    src_valid = 1'b0; src_data = '0; out_ready = 1'b1;
    p_late = 100; p_src = 700; p_rdy = 600;
    @(posedge rst_n);
    // phase A
    for (int c = 0; c < NA; c++) begin
      @(negedge ck);
      if (!src_valid || taken) begin
        src_valid = ($urandom_range(999) < p_src);
        src_data  = rnd_word();
      end
      out_ready = ($urandom_range(999) < p_rdy);
    end
    if (src_valid) begin
      while (!src_ready) @(negedge ck);
      @(negedge ck);
    end
    src_valid = 1'b0;
    out_ready = 1'b1;
    p_late = 0;
    repeat (4 * B + 8) @(negedge ck);
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL s%0d: phase A lost %0d flits", SCHEME, exp_q.size());
      exp_q.delete();
    end
    checks++;
    if (SCHEME == 1 && n_bad > n_err) begin
      failures++; $display("FAIL s%0d: %0d wrong flits, %0d flagged", SCHEME, n_bad, n_err);
    end
    // phase B
    for (int b = 0; b < NB; b++) begin
      automatic int len = $urandom_range(8, 40);
      p_late = (b % 3 == 0) ? 0 : 150;
      err0 = n_err;
      first_pend = 1'b1;
      for (int k = 0; k < len; k++) begin
        src_valid = 1'b1;
        src_data  = rnd_word();
        while (!src_ready) @(negedge ck);   // ready for the coming edge
        @(negedge ck);                      // taken at the edge just passed
      end
      src_valid = 1'b0;
      p_late = 0;
      repeat (3 * B + 10) @(negedge ck);
      pen = last_rx - first_tx - (len - 1) - (B + 2);
      checks++;
      if (exp_q.size() != 0) begin
        failures++; $display("FAIL s%0d: burst %0d lost %0d flits", SCHEME, b, exp_q.size());
        exp_q.delete();
      end else if (n_err == err0 || SCHEME == 1) begin
        if (pen != 0) begin
          failures++; $display("FAIL s%0d: burst %0d penalty %0d, expected 0", SCHEME, b, pen);
        end
      end else if (SCHEME == 2 && (pen < 1 || pen > B)) begin
        failures++; $display("FAIL s2: burst %0d penalty %0d outside 1..%0d", b, pen, B);
      end else if (SCHEME == 3 && (pen < 1 || pen > n_err - err0)) begin
        failures++; $display("FAIL s3: burst %0d penalty %0d, %0d errors", b, pen, n_err - err0);
      end
    end
    done = 1'b1;
  end
endmodule

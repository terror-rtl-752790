// link_receiver_tb: a model of the last link buffer offers one word per cycle
// (holding it while the receiver stalls) with its valid one cycle later;
// some words are empty or withdrawn (valid 0).  The switch side takes flits
// at random.  Checks: the flits leaving are exactly the valid words, in
// order; stall_out is raised; with the switch side always ready a stream of
// 40 flits leaves at one flit per cycle.
module link_receiver_tb;
  localparam int W = terror_pkg::W_DEF;
  int checks = 0, failures = 0;
  logic ck = 1'b0, rst_n = 1'b0;
  always #500 ck = ~ck;

  logic [W-1:0] d, out_data;
  logic         v_in, stall_out, out_valid, out_ready;
  link_receiver dut (.ck, .rst_n, .d, .v_in, .stall_out, .out_valid, .out_data, .out_ready);

  // upstream model
  logic [W-1:0] exp_q [$];
  logic         dv = 1'b0;       // valid of the word shown now
  int           p_valid = 700, n_out = 0, n_stall = 0, cyc = 0, stream_left = 0;
  always @(posedge ck) if (rst_n) begin
    cyc  <= cyc + 1;
    v_in <= dv;
    if (!stall_out) begin
      // word shown in the cycle just ended was taken
      if (dv) exp_q.push_back(d);
      d  <= $urandom;
      dv <= (stream_left > 0) ? 1'b1 : ($urandom_range(999) < p_valid);
      if (stream_left > 0) stream_left <= stream_left - 1;
    end
    if (stall_out) n_stall++;
  end

  always @(posedge ck) if (rst_n && out_valid && out_ready) begin
    checks++;
    n_out++;
    if (exp_q.size() == 0 || exp_q.pop_front() !== out_data) begin
      failures++; $display("FAIL: flit %h not the next valid word", out_data);
    end
  end

  initial begin
    #(5000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int c0, o0;
    out_ready = 1'b0; v_in = 1'b0; d = '0;
    repeat (2) @(negedge ck);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(negedge ck);
      out_ready = ($urandom_range(9) < 6);
    end
    out_ready = 1'b1;
    p_valid = 0;
    repeat (6) @(negedge ck);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d flits left", exp_q.size()); end
    // stream of 40 back-to-back flits
    o0 = n_out;
    stream_left = 40;
    c0 = cyc;
    repeat (43) @(negedge ck);
    checks++;
    if (n_out - o0 != 40) begin failures++; $display("FAIL: stream gave %0d of 40 in time", n_out - o0); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// link_sender_tb: random flits offered on the valid/ready side, random stall
// from a model of the first link buffer.  The model takes the sender's word
// in every cycle it does not stall and keeps it when the late valid (v_out,
// one cycle later) is 1.  Checks: the kept words are exactly the offered
// flits, in order; a flit is never taken twice; src_ready is 0 only while a
// stalled flit is held; an unstalled stream runs at one flit per cycle.
module link_sender_tb;
  localparam int W = terror_pkg::W_DEF;
  int checks = 0, failures = 0;
  logic ck = 1'b0, rst_n = 1'b0;
  always #500 ck = ~ck;

  logic         src_valid, src_ready, v_out, stall_in;
  logic [W-1:0] src_data, q;
  link_sender dut (.ck, .rst_n, .src_valid, .src_data, .src_ready, .q, .v_out, .stall_in);

  logic [W-1:0] exp_q [$];
  logic [W-1:0] cap;
  logic         cap_ok = 1'b0, taken = 1'b0;
  int n_rx = 0, n_stall_hold = 0, cyc = 0;

  always @(posedge ck) if (rst_n) begin
    cyc <= cyc + 1;
    if (src_valid && src_ready) exp_q.push_back(src_data);
    taken <= src_valid && src_ready;
    if (cap_ok && v_out) begin
      checks++;
      n_rx++;
      if (exp_q.size() == 0 || exp_q.pop_front() !== cap) begin
        failures++; $display("FAIL: word %h not the next flit", cap);
      end
    end
    cap    <= q;
    cap_ok <= !stall_in;
    if (!src_ready) n_stall_hold++;
  end

  int p_stall;
  initial begin
    #(5000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int c0, r0;
    src_valid = 1'b0; src_data = '0; stall_in = 1'b0; p_stall = 300;
    repeat (2) @(negedge ck);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(negedge ck);
      if (!src_valid || taken) begin
        src_valid = ($urandom_range(9) < 7);
        src_data  = $urandom;
      end
      stall_in = ($urandom_range(999) < p_stall);
      #1;
      checks++;
      if (!stall_in && !src_ready) begin
        failures++; $display("FAIL: src_ready low without stall");
      end
    end
    // unstalled stream: 50 flits in 50 cycles
    stall_in = 1'b0;
    if (src_valid) begin while (!src_ready) @(negedge ck); @(negedge ck); end
    src_valid = 1'b0;
    repeat (4) @(negedge ck);
    c0 = cyc; r0 = n_rx;
    for (int k = 0; k < 50; k++) begin
      src_valid = 1'b1; src_data = $urandom;
      @(negedge ck);
    end
    src_valid = 1'b0;
    repeat (4) @(negedge ck);
    checks++;
    if (n_rx - r0 != 50 || exp_q.size() != 0) begin
      failures++; $display("FAIL: stream delivered %0d of 50", n_rx - r0);
    end
    checks++;
    if (n_stall_hold == 0) begin failures++; $display("FAIL: sender never held a flit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

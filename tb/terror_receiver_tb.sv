// terror_receiver_tb: random words and correction pulses into the receiver;
// each output must equal the word of the previous cycle, kept only when its
// valid line was 1 and the correction line was 0.
module terror_receiver_tb;
  localparam int W = terror_pkg::W_DEF;
  int checks = 0, failures = 0;
  logic ck = 1'b0, rst_n = 1'b0;
  always #500 ck = ~ck;

  logic [W:0]   d;
  logic         pc, out_valid, discarded;
  logic [W-1:0] out_data;
  terror_receiver dut (.ck, .rst_n, .d, .prev_corr(pc), .out_valid, .out_data, .discarded);

  logic         exp_v, exp_dis;
  logic [W-1:0] exp_d;
  int n_keep = 0, n_drop = 0;

  initial begin
    #(5000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    d = '0; pc = 1'b0;
    repeat (2) @(negedge ck);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge ck);
      d  = {($urandom_range(3) != 0), W'($urandom)};
      pc = ($urandom_range(4) == 0);
      exp_v   = d[W] && !pc;
      exp_d   = d[W-1:0];
      exp_dis = pc;
      @(negedge ck);
      checks++;
      if (out_valid !== exp_v || discarded !== exp_dis || (exp_v && out_data !== exp_d)) begin
        failures++;
        $display("FAIL: out_valid=%b data=%h discarded=%b, expected %b %h %b",
                 out_valid, out_data, discarded, exp_v, exp_d, exp_dis);
      end
      if (exp_v) n_keep++;
      if (d[W] && pc) n_drop++;
    end
    checks++;
    if (n_keep == 0 || n_drop == 0) begin failures++; $display("FAIL: no keep or no drop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

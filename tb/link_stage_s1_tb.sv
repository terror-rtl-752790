// link_stage_s1_tb: directed test of the scheme-1 link buffer
// (link_stage_s1) through stage_bench: error-free burst, late words and the
// resulting errors, wrong flits and penalty, return to normal mode, and
// back-pressure.  Clocks: ck period 1000, ckd = ck + 500.
module link_stage_s1_tb;
  logic ck = 1'b0, ckd, rst_n = 1'b0;
  always #500 ck = ~ck;
  delay_chain #(.DLY(500)) u_ckd (.in(ck), .out(ckd));

  int   checks, failures;
  logic done;
  stage_bench #(.W(32), .SCHEME(1)) u_bench (.ck, .ckd, .rst_n, .checks, .failures, .done);

  initial begin
    #(20000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge ck);
    @(negedge ck);
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

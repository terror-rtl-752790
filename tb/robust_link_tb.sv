// robust_link_tb: runs robust_link_bench for schemes 1, 2 and 3 side by side
// on one clock pair (ck, ckd = ck + 500 ps), each at 32-bit and at 64-bit
// flits (the two link widths whose area is compared), with 4 buffers per
// link.  It requires that stall, delayed mode, timing errors and, for
// scheme 2, auxiliary mode each occurred in every instance.
module robust_link_tb;
  localparam int B = 4;
  logic ck = 1'b0, ckd, rst_n = 1'b0;
  always #500 ck = ~ck;
  delay_chain #(.DLY(500)) u_ckd (.in(ck), .out(ckd));

  // instance k: scheme k % 3 + 1, width 32 for k < 3, 64 otherwise
  int   chk [6], fl [6], ne [6], ns [6], nd [6], na [6];
  logic dn [6];
  for (genvar s = 0; s < 6; s++) begin : g_s
    robust_link_bench #(.W(s < 3 ? 32 : 64), .B(B), .SCHEME(s % 3 + 1)) u_bench (
      .ck, .ckd, .rst_n, .checks(chk[s]), .failures(fl[s]), .n_err(ne[s]),
      .n_stall(ns[s]), .n_delayed(nd[s]), .n_aux(na[s]), .done(dn[s]));
  end

  int checks = 0, failures = 0;
  initial begin
    #(20000 * 1000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge ck);
    @(negedge ck);
    rst_n = 1'b1;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5]);
    for (int k = 0; k < 6; k++) begin
      automatic int s = k;
      $display("scheme %0d, %0d bit: checks=%0d failures=%0d errors=%0d stall=%0d delayed=%0d aux=%0d",
               k % 3 + 1, k < 3 ? 32 : 64, chk[s], fl[s], ne[s], ns[s], nd[s], na[s]);
      checks += chk[s] + 3; failures += fl[s];
      if (ne[s] == 0) begin failures++; $display("FAIL: instance %0d saw no timing error", k); end
      if (ns[s] == 0) begin failures++; $display("FAIL: instance %0d never stalled", k); end
      if (nd[s] == 0) begin failures++; $display("FAIL: instance %0d never in delayed mode", k); end
    end
    checks += 2;
    if (na[1] == 0) begin failures++; $display("FAIL: scheme 2 (32 bit) never in auxiliary mode"); end
    if (na[4] == 0) begin failures++; $display("FAIL: scheme 2 (64 bit) never in auxiliary mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

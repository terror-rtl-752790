// wire_segment: behavioural model of the wire between two link buffers.
// The source is a flop clocked by ck.  A word launched at a ck edge arrives
// T_NORM later, or T_LATE later when 'late' is 1 at that edge (a delay
// variation from crosstalk, supply noise, ...).  With a 1000 ps cycle, ckd at
// +500 ps and T_NORM=700, T_LATE=1200, a late word misses the main flop's
// next ck edge but is caught by the delayed flop.  T_NORM must exceed the ckd
// delay so the delayed flop still holds the previous word at its edge.
// With XTALK=1 a word is also late when, against the word launched before it,
// some line switches opposite to both of its neighbours (101 -> 010 or
// 010 -> 101): the worst crosstalk pattern, which slows the middle line by
// about half its normal delay.  This makes the timing errors depend on the
// data, as in a real bus.  adversarial() is the pattern test.
module wire_segment #(
  parameter int N      = 33,
  parameter int T_NORM = 700,
  parameter int T_LATE = 1200,
  parameter bit XTALK  = 1'b0
) (
  input  logic         ck,
  input  logic [N-1:0] src,
  input  logic         late,
  output logic [N-1:0] dst
);
  function automatic bit adversarial(input logic [N-1:0] a, input logic [N-1:0] b);
    for (int i = 1; i < N - 1; i++)
      if ((a[i] != a[i-1]) && (a[i] != a[i+1]) && (b[i+1-:3] == ~a[i+1-:3])) return 1'b1;
    return 1'b0;
  endfunction

  logic [N-1:0] prev = '0;
  initial dst = '0;
  always @(posedge ck) begin
    automatic logic [N-1:0] v;
    automatic logic         l;
    l = late;
    #1;
    v = src;
    if (XTALK && adversarial(prev, v)) l = 1'b1;
    prev = v;
    fork
      begin
        if (l) #(T_LATE - 1);
        else   #(T_NORM - 1);
        dst = v;
      end
    join_none
  end
endmodule

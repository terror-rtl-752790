// wire_segment_var: behavioural model of a wire segment whose delay is chosen
// per word from five classes.  The source is a flop clocked by ck; a word
// launched at a ck edge arrives after
//   lateness 0: 700 ps (normal), 1: 1150, 2: 1250, 3: 1350, 4: 1450 ps,
// with the class taken from 'lateness' at that edge.  With a 1000 ps cycle a
// late word misses the main flop's next ck edge; it is still caught by the
// delayed flop only if ckd lags ck by more than (arrival - 1000) ps, so the
// classes let a testbench sweep the ck-to-ckd delay from 100 to 500 ps.  A
// word that arrives after ckd is overwritten by the next word and lost.
module wire_segment_var #(
  parameter int N = 33
) (
  input  logic         ck,
  input  logic [N-1:0] src,
  input  logic [2:0]   lateness,
  output logic [N-1:0] dst
);
  initial dst = '0;
  always @(posedge ck) begin
    automatic logic [N-1:0] v;
    automatic logic [2:0]   l;
    l = lateness;
    #1;
    v = src;
    fork
      begin
        case (l)
          3'd1:    #(1149);
          3'd2:    #(1249);
          3'd3:    #(1349);
          3'd4:    #(1449);
          default: #(699);
        endcase
        dst = v;
      end
    join_none
  end
endmodule

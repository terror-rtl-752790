// terror_receiver: receiving end of a Terror link.
//
// At every ck edge it registers the word of the last link buffer (bit W is
// the valid line).  The correction line from that buffer, which changes at
// ckdd, is 1 in exactly the cycle after the buffer sent a wrong word, so at
// the ck edge that captures the wrong word it is already 1: such a word is
// discarded (out_valid stays 0).  The correct copy follows in the next
// cycle.  Output: out_valid/out_data, one word per cycle at most, in order,
// one cycle after the word leaves the last buffer.  Sampling the last buffer
// directly and the valid line are this implementation's choices.
module terror_receiver #(
  parameter int unsigned W = terror_pkg::W_DEF
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic [W:0]   d,          // last buffer's output
  input  logic         prev_corr,  // last buffer's corr_out
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         discarded   // a word was dropped at this edge
);
  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      discarded <= 1'b0;
    end else begin
      out_valid <= d[W] && !prev_corr;
      out_data  <= d[W-1:0];
      discarded <= prev_corr;
    end
endmodule

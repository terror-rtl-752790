// link_receiver: receiving end of a robust link, the two-entry input buffer
// of a switch port.
//
// It takes the last link buffer's word at every ck edge while its stall_out
// is 0.  The word's valid arrives one cycle later (v_in): a word with valid 0
// (an empty word, or a flit a scheme-2/3 buffer has withdrawn because of a
// timing error) is dropped, a good one stays until the switch side takes it.
// stall_out is raised when both entries are in use.  Switch side: a
// valid/ready port; out_valid of the newest entry is v_in itself, so a flit
// can leave in the cycle after it arrived.  The two entries and the stall rule
// follow the design; the valid/ready port is this implementation's choice.
module link_receiver #(
  parameter int unsigned W = terror_pkg::W_DEF
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         v_in,
  output logic         stall_out,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready
);
  logic [W-1:0] r0, r1;
  logic [1:0]   cnt;
  logic         pend;

  logic       drop, consume, accept;
  logic [1:0] cnt_r, n, cnt_n;
  always_comb begin
    drop      = pend && !v_in;
    cnt_r     = cnt - {1'b0, drop};
    out_valid = (cnt_r != 2'd0);
    out_data  = r0;
    consume   = out_valid && out_ready;
    accept    = !stall_out;
    n         = cnt_r - {1'b0, consume};
    cnt_n     = n + {1'b0, accept};
  end

  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) begin
      r0        <= '0;
      r1        <= '0;
      cnt       <= '0;
      pend      <= 1'b0;
      stall_out <= 1'b0;
    end else begin
      if (accept && n == 2'd0)           r0 <= d;
      else if (consume && cnt_r == 2'd2) r0 <= r1;
      if (accept && n == 2'd1)           r1 <= d;
      cnt       <= cnt_n;
      pend      <= accept;
      stall_out <= (cnt_n == 2'd2);
    end
endmodule

// link_sender: sending end of a robust link (a switch output port or a
// network interface).
//
// It holds one flit in its output register q, which drives the first wire
// segment.  v_out, one cycle later, says whether the word shown in the
// previous cycle was a flit.  While stall_in (the first buffer's stall_out)
// is 1 the word shown is not taken and is shown again; otherwise the next
// flit, or an empty word, is loaded.  Core side: a valid/ready port
// (src_ready depends only on registers).  The late valid and the stall rule
// are the link's; the valid/ready port is this implementation's choice.
module link_sender #(
  parameter int unsigned W = terror_pkg::W_DEF
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic         src_valid,
  input  logic [W-1:0] src_data,
  output logic         src_ready,
  output logic [W-1:0] q,
  output logic         v_out,
  input  logic         stall_in
);
  logic qv;   // q holds a flit not yet taken

  assign src_ready = !qv || !stall_in;

  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) begin
      q     <= '0;
      qv    <= 1'b0;
      v_out <= 1'b0;
    end else begin
      v_out <= qv;
      if (src_ready) begin
        qv <= src_valid;
        if (src_valid) q <= src_data;
      end
    end
endmodule

// link_stage_s2: link buffer of scheme 2 ("Terror detection and correction"),
// a three-entry FIFO that both stores flits on the link and corrects timing
// errors with a penalty bounded by one cycle per buffer.
//
// Storage: main flop (ck) drives the next wire segment; delayed flop (ckd)
// and auxiliary flop (ckd) sit behind it.  Entries are kept in order main,
// delayed, auxiliary, so the mode is the number of entries in use:
//   NORMAL  - the main flop takes the wire directly; the delayed flop takes a
//             second, later sample of the same flit and an XOR/OR compares
//             the two (timing error check);
//   DELAYED - flits enter the delayed flop and move to the main flop one
//             cycle later (entered after a timing error or a stall);
//   AUX     - a stall arrived in delayed mode: the incoming flit goes to the
//             auxiliary flop and the three flops work in series.
// On a timing error the main flop reloads the delayed copy (muxselect) and
// v_out=0 tells the next buffer that the flit it got in the previous cycle
// was wrong; the stage then stays in delayed mode while flits keep coming, so
// later errors cannot happen.  A flit whose valid is 0 is not stored, which
// shrinks the FIFO and returns the stage to normal mode.
//
// Interface (same for all three schemes):
//   d        word arriving from the previous wire segment
//   v_in     1 if the word offered in the PREVIOUS cycle was a good flit
//   stall_out register: 1 = this buffer does not take the word offered now
//   q        main flop output, to the next segment
//   v_out    qualifies the word q showed in the previous cycle
//   stall_in next buffer's stall_out
// A word offered while stall_out=0 is always taken; the sender of a word
// shown while stall_in=1 shows it again.  The FSM runs on ck; its error input
// comes from the ckd sample and must settle before the next ck edge.
// The three flops, their clocks, the XOR check and the three modes follow the
// design; the one-cycle-late valid and the entry counting are this
// implementation's reading of the control FSM.
module link_stage_s2 #(
  parameter int unsigned W = terror_pkg::W_DEF
) (
  input  logic                   ck,
  input  logic                   ckd,
  input  logic                   rst_n,
  input  logic [W-1:0]           d,
  input  logic                   v_in,
  output logic                   stall_out,
  output logic [W-1:0]           q,
  output logic                   v_out,
  input  logic                   stall_in,
  output logic                   err_out,   // pulse: timing error corrected
  output terror_pkg::link_mode_e mode
);
  import terror_pkg::*;
  localparam int unsigned CAP = 3;

  logic [W-1:0] q_main, q_dly, q_aux;
  logic [1:0]   cnt;          // entries in use, including the newest one
  logic         pend;         // newest entry's valid not yet known
  logic         shadow;       // delayed flop holds a second sample of main
  logic         dly_we, dly_from_aux, aux_we;  // enables for the ckd flops

  // resolution of the newest entry and the timing-error check
  logic       err, drop, head_ok, consume, accept;
  logic [1:0] cnt_r, n, cnt_n;
  always_comb begin
    err     = pend && shadow && (cnt == 2'd1) && v_in && (q_main != q_dly);
    drop    = pend && !v_in;
    cnt_r   = cnt - {1'b0, drop};
    head_ok = (cnt_r != 2'd0) && !err;
    consume = head_ok && !stall_in;
    accept  = !stall_out;
    n       = cnt_r - {1'b0, consume};
    cnt_n   = n + {1'b0, accept};
  end

  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) begin
      q_main       <= '0;
      cnt          <= '0;
      pend         <= 1'b0;
      shadow       <= 1'b0;
      stall_out    <= 1'b0;
      v_out        <= 1'b0;
      err_out      <= 1'b0;
      dly_we       <= 1'b0;
      dly_from_aux <= 1'b0;
      aux_we       <= 1'b0;
    end else begin
      // main flop and its input mux
      if (err)                               q_main <= q_dly;   // resend correct copy
      else if (consume && cnt_r >= 2'd2)     q_main <= q_dly;   // delayed -> main
      else if (n == 2'd0 && accept)          q_main <= d;       // normal mode

      // ckd flops for this cycle
      dly_from_aux <= consume && (cnt_r == 2'd3);
      dly_we       <= (consume && (cnt_r == 2'd3)) || (accept && n <= 2'd1);
      aux_we       <= accept && (n == 2'd2);

      cnt       <= cnt_n;
      pend      <= accept;
      shadow    <= accept && (n == 2'd0);
      stall_out <= (cnt_n == 2'(CAP));
      v_out     <= head_ok;
      err_out   <= err;
    end

  always_ff @(posedge ckd or negedge rst_n)
    if (!rst_n) begin
      q_dly <= '0;
      q_aux <= '0;
    end else begin
      if (dly_we) q_dly <= dly_from_aux ? q_aux : d;
      if (aux_we) q_aux <= d;
    end

  assign q    = q_main;
  assign mode = (cnt == 2'd3) ? MODE_AUX : (cnt == 2'd2) ? MODE_DELAYED : MODE_NORMAL;
endmodule

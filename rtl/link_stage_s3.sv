// link_stage_s3: link buffer of scheme 3 ("simplified Terror correction"), a
// two-entry FIFO that corrects every timing error at the cost of one cycle
// per error.
//
// Storage: main flop (ck) drives the next wire segment; delayed flop (ckd)
// behind it.  In normal mode the main flop takes the wire and the delayed
// flop takes a second, later sample of the same flit; an XOR/OR compares
// them.  On a timing error:
//   * the main flop reloads the delayed copy (muxselect) and sends it in the
//     next cycle, while v_out=0 tells the next buffer that the flit it got in
//     the previous cycle was wrong;
//   * the next incoming flit goes to the delayed flop, both entries are then
//     in use and stall_out stalls the previous buffer for one cycle;
//   * one cycle later the delayed flit moves to the main flop and the stage
//     is back in normal mode.
// So each error costs one cycle, unlike scheme 2.  Back-pressure (stall_in)
// is absorbed the same way: the main flop holds, the delayed flop takes the
// flit already on its way, and stall is passed back.  A flit whose valid is
// 0 is not stored.
// mode is NORMAL or DELAYED (never AUX; its upper bit stays 0, kept for the
// common interface).
//
// Interface and timing are those of link_stage_s2 (v_in/v_out qualify the
// word of the previous cycle; stall_out is a register; the FSM runs on ck
// and its error input must settle between ckd and the next ck edge).  The two
// flops, their clocks, the XOR check and the one-cycle stall follow the
// design; the entry counting is this implementation's reading of the FSM.
module link_stage_s3 #(
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
  localparam int unsigned CAP = 2;

  logic [W-1:0] q_main, q_dly;
  logic [1:0]   cnt;
  logic         pend, shadow, dly_we;

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
      q_main    <= '0;
      cnt       <= '0;
      pend      <= 1'b0;
      shadow    <= 1'b0;
      stall_out <= 1'b0;
      v_out     <= 1'b0;
      err_out   <= 1'b0;
      dly_we    <= 1'b0;
    end else begin
      if (err)                           q_main <= q_dly;
      else if (consume && cnt_r == 2'd2) q_main <= q_dly;
      else if (n == 2'd0 && accept)      q_main <= d;

      dly_we    <= accept;            // shadow sample (n=0) or new entry (n=1)
      cnt       <= cnt_n;
      pend      <= accept;
      shadow    <= accept && (n == 2'd0);
      stall_out <= (cnt_n == 2'(CAP));
      v_out     <= head_ok;
      err_out   <= err;
    end

  always_ff @(posedge ckd or negedge rst_n)
    if (!rst_n)      q_dly <= '0;
    else if (dly_we) q_dly <= d;

  assign q    = q_main;
  assign mode = (cnt == 2'd2) ? MODE_DELAYED : MODE_NORMAL;
endmodule

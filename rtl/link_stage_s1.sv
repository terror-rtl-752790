// link_stage_s1: link buffer of scheme 1 ("Terror detection"), the two-entry
// link FIFO that lets the link store flits, with its second flop clocked by
// the delayed clock ckd.
//
// Storage: main flop (ck) drives the next wire segment; delayed flop (ckd)
// behind it.  Without back-pressure only the main flop carries flits.  When
// stall_in arrives the main flop holds its flit, the flit already on the
// wire is taken by the delayed flop, stall_out is raised (the stall moves
// back one buffer per cycle), and when stall_in drops the main flop sends the
// delayed flop's flit and the stage returns to normal mode.  A flit that
// waits in the delayed flop was sampled late and so is free of timing errors;
// that is why a congested link sees few errors.  A flit taken by the main
// flop may be wrong: while the delayed flop is free it takes a second sample
// of that flit, and an XOR/OR comparison raises err_out.  Scheme 1 does not
// correct the flit; err_out is for a retransmission mechanism outside the
// link.  A flit whose valid is 0 is not stored.  mode is NORMAL or DELAYED
// (never AUX; its upper bit stays 0, kept for the common interface).
//
// Interface and timing are those of link_stage_s2 (v_in/v_out qualify the
// word of the previous cycle; stall_out is a register; the FSM runs on ck).
// The two flops, ckd on the second one and the stall behaviour follow the
// design; the error flag and the entry counting are this implementation's
// choices.
module link_stage_s1 #(
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
  output logic                   err_out,   // pulse: timing error detected
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
    head_ok = (cnt_r != 2'd0);
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
      if (consume && cnt_r == 2'd2)  q_main <= q_dly;
      else if (n == 2'd0 && accept)  q_main <= d;

      dly_we    <= accept;
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

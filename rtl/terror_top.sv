// terror_top: the timing-error tolerant link designs side by side.
//
//  * t_*: a point-to-point Terror link (terror_link, B Terror buffers) with a
//    launch register at the sending end and terror_receiver at the receiving
//    end.  A word's extra delay from timing errors is at most B cycles per
//    transfer, whatever the error rate.
//  * r_*[s]: three switch-to-switch NoC links built from link buffers that
//    also store flits (stall/valid flow control), one per robust scheme:
//    index 0 = scheme 1 (delayed second flop, errors only detected),
//    index 1 = scheme 2 (three-entry FIFO, correction with a penalty bounded
//    by B), index 2 = scheme 3 (two-entry FIFO, one cycle per error).  Each
//    has a link_sender and a link_receiver (two-entry switch input buffer);
//    all three have the same terminal interface, so a NoC can use any of
//    them on any link.
//
// The wire segments between buffers are physical wires and are not in this
// module: *_seg_launch[i] is the launch end of segment i (the sender's
// register for i = 0, buffer i-1's output otherwise), *_seg_arrive[i] must be
// connected to the arrival end of segment i, which feeds buffer i.  The last
// buffer of each link drives its receiver directly.  Clocks: ck; ckd, a copy
// of ck delayed by up to half a cycle (delayed flops); ckdd, later than ckd
// and before the next ck (Terror error-control circuit).  rst_n is an
// active-low asynchronous reset.  Flit and bus width W and buffers per link
// B default to 32 and 4.  r_mode of schemes 1 and 3 never shows AUX (two-entry
// buffers), so the upper bit of those entries is constant 0.
module terror_top #(
  parameter int unsigned W = terror_pkg::W_DEF,
  parameter int unsigned B = terror_pkg::B_DEF
) (
  input  logic                   ck,
  input  logic                   ckd,
  input  logic                   ckdd,
  input  logic                   rst_n,
  // point-to-point Terror link
  input  logic                   t_src_valid,
  input  logic [W-1:0]           t_src_data,
  output logic [W:0]             t_seg_launch [B],   // bit W = valid line
  input  logic [W:0]             t_seg_arrive [B],
  output logic                   t_out_valid,
  output logic [W-1:0]           t_out_data,
  output logic [B-1:0]           t_sel,
  output logic [B-1:0]           t_err,
  output logic                   t_discarded,        // receiver dropped a corrected word
  // robust NoC links, index s = scheme s+1
  input  logic [2:0]             r_src_valid,
  input  logic [W-1:0]           r_src_data   [3],
  output logic [2:0]             r_src_ready,
  output logic [W-1:0]           r_seg_launch [3][B],
  input  logic [W-1:0]           r_seg_arrive [3][B],
  output logic [2:0]             r_out_valid,
  output logic [W-1:0]           r_out_data   [3],
  input  logic [2:0]             r_out_ready,
  output logic [2:0]             r_err,
  output logic [B-1:0]           r_stage_err  [3],
  output terror_pkg::link_mode_e r_mode       [3][B]
);
  // ---------------- point-to-point Terror link ----------------
  logic [W:0] t_snd;
  logic [W:0] t_tx [B];
  logic       t_corr;

  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) t_snd <= '0;
    else        t_snd <= {t_src_valid, t_src_data};

  terror_link #(.W(W), .B(B)) u_tlink (
    .ck, .ckd, .ckdd, .rst_n, .seg_rx(t_seg_arrive), .seg_tx(t_tx),
    .corr_in(1'b0), .corr_out(t_corr), .sel(t_sel), .err(t_err));

  terror_receiver #(.W(W)) u_trx (
    .ck, .rst_n, .d(t_tx[B-1]), .prev_corr(t_corr),
    .out_valid(t_out_valid), .out_data(t_out_data), .discarded(t_discarded));

  always_comb begin
    t_seg_launch[0] = t_snd;
    for (int i = 1; i < B; i++) t_seg_launch[i] = t_tx[i-1];
  end

  // ---------------- robust NoC links ----------------
  for (genvar s = 0; s < 3; s++) begin : g_rlink
    logic [W-1:0] snd_q;
    logic         snd_v, snd_stall, lk_v, rx_stall;
    logic [W-1:0] tx [B];

    link_sender #(.W(W)) u_snd (
      .ck, .rst_n, .src_valid(r_src_valid[s]), .src_data(r_src_data[s]),
      .src_ready(r_src_ready[s]), .q(snd_q), .v_out(snd_v), .stall_in(snd_stall));

    robust_link #(.W(W), .B(B), .SCHEME(s + 1)) u_link (
      .ck, .ckd, .rst_n, .seg_rx(r_seg_arrive[s]), .seg_tx(tx), .v_in(snd_v),
      .stall_out(snd_stall), .v_out(lk_v), .stall_in(rx_stall),
      .err_out(r_err[s]), .err(r_stage_err[s]), .mode(r_mode[s]));

    link_receiver #(.W(W)) u_rx (
      .ck, .rst_n, .d(tx[B-1]), .v_in(lk_v), .stall_out(rx_stall),
      .out_valid(r_out_valid[s]), .out_data(r_out_data[s]), .out_ready(r_out_ready[s]));

    always_comb begin
      r_seg_launch[s][0] = snd_q;
      for (int i = 1; i < B; i++) r_seg_launch[s][i] = tx[i-1];
    end
  end
endmodule

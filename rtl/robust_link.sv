// robust_link: a switch-to-switch NoC link of B buffers of one robust scheme,
// chosen by SCHEME (1 = detection only, 2 = detection and correction with a
// penalty bounded by B, 3 = simplified correction, one cycle per error).
//
// Flits travel forward on d/q with their one-cycle-late valid; stall travels
// backward one buffer per cycle.  Every scheme has the same terminal
// interface, so one link can replace another without touching the switches.
// The wire segments are physical wires outside this module: seg_rx[i] is the
// end of the segment arriving at buffer i (segment 0 comes from the sender),
// seg_tx[i] is buffer i's output; seg_tx[B-1] is the link output, sampled by
// the receiver with ck.  The valid and stall lines are assumed free of timing
// errors (shielded or conservatively routed).
//
// Ports: v_in/stall_out face the sender, v_out/stall_in the receiver;
// err_out is the OR of the buffers' error pulses; err and mode are per buffer.
// Zero-load latency: B cycles from the sender's register to seg_tx[B-1].
module robust_link #(
  parameter int unsigned W      = terror_pkg::W_DEF,
  parameter int unsigned B      = terror_pkg::B_DEF,
  parameter int unsigned SCHEME = 2
) (
  input  logic                   ck,
  input  logic                   ckd,
  input  logic                   rst_n,
  input  logic [W-1:0]           seg_rx [B],
  output logic [W-1:0]           seg_tx [B],
  input  logic                   v_in,
  output logic                   stall_out,
  output logic                   v_out,
  input  logic                   stall_in,
  output logic                   err_out,
  output logic [B-1:0]           err,
  output terror_pkg::link_mode_e mode [B]
);
  logic [B:0] v, stall;
  assign v[0]      = v_in;
  assign stall_out = stall[0];
  assign stall[B]  = stall_in;
  assign v_out     = v[B];

  for (genvar i = 0; i < B; i++) begin : g_stage
    if (SCHEME == 1) begin : g_s1
      link_stage_s1 #(.W(W)) u_stage (
        .ck, .ckd, .rst_n, .d(seg_rx[i]), .v_in(v[i]), .stall_out(stall[i]),
        .q(seg_tx[i]), .v_out(v[i+1]), .stall_in(stall[i+1]),
        .err_out(err[i]), .mode(mode[i]));
    end else if (SCHEME == 3) begin : g_s3
      link_stage_s3 #(.W(W)) u_stage (
        .ck, .ckd, .rst_n, .d(seg_rx[i]), .v_in(v[i]), .stall_out(stall[i]),
        .q(seg_tx[i]), .v_out(v[i+1]), .stall_in(stall[i+1]),
        .err_out(err[i]), .mode(mode[i]));
    end else begin : g_s2
      link_stage_s2 #(.W(W)) u_stage (
        .ck, .ckd, .rst_n, .d(seg_rx[i]), .v_in(v[i]), .stall_out(stall[i]),
        .q(seg_tx[i]), .v_out(v[i+1]), .stall_in(stall[i+1]),
        .err_out(err[i]), .mode(mode[i]));
    end
  end

  assign err_out = |err;
endmodule

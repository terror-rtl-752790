// terror_link: a point-to-point link of B Terror buffers (terror_stage) for
// W data bits plus a valid line.
//
// The wire segments between buffers are physical wires, so they are not part
// of this module: seg_tx[i] is the launch end driven by stage i, seg_rx[i] is
// the end arriving at stage i.  In a system seg_rx[0] is driven by the
// sender's register through the first segment and seg_rx[i] by seg_tx[i-1]
// through segment i.  seg_tx[B-1] is the link output, sampled with ck by the
// receiver (terror_receiver) next to the last buffer.  The correction lines
// are chained stage to stage (corr_out -> prev_corr) and are assumed free of
// timing errors (shielded or routed conservatively).
//
// Latency: one cycle per stage in normal mode, two per stage in delayed
// mode; each stage adds at most one cycle of penalty per transfer, so the
// total penalty is between 1 and B cycles whatever the error rate.
// Clocks ck, ckd, ckdd as in terror_stage (one set shared by all stages here).
module terror_link #(
  parameter int unsigned W = terror_pkg::W_DEF,
  parameter int unsigned B = terror_pkg::B_DEF
) (
  input  logic         ck,
  input  logic         ckd,
  input  logic         ckdd,
  input  logic         rst_n,
  input  logic [W:0]   seg_rx [B],  // arrival end of each segment
  output logic [W:0]   seg_tx [B],  // each stage's output
  input  logic         corr_in,     // prev_corr of stage 0 (from the sender)
  output logic         corr_out,    // correction line to the receiver
  output logic [B-1:0] sel,         // per stage: 1 = delayed mode
  output logic [B-1:0] err          // per stage: error detected this cycle
);
  logic [B:0] corr;
  assign corr[0] = corr_in;

  for (genvar i = 0; i < B; i++) begin : g_stage
    terror_stage #(.W(W)) u_stage (
      .ck, .ckd, .ckdd, .rst_n,
      .d         (seg_rx[i]),
      .prev_corr (corr[i]),
      .q         (seg_tx[i]),
      .corr_out  (corr[i+1]),
      .sel       (sel[i]),
      .err       (err[i])
    );
  end

  assign corr_out = corr[B];
endmodule

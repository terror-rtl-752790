// terror_stage: one Terror pipeline buffer of a point-to-point link, for all
// W+1 bit-lines (W data bits plus a valid line in bit W).
//
// Every bit-line has a main flop clocked by ck and a delayed flop clocked by
// ckd, a copy of ck delayed by a fraction of the cycle.  The wire is
// sampled twice; the delayed sample has extra time to settle and is taken as
// correct.  An XOR per bit and an OR over all bits (errq -> err) flag a word
// whose main sample differs from the delayed one.  One error-control circuit
// per stage, clocked by ckdd (later than ckd, before the next ck), then:
//   * sets sel, so that from the next ck edge the main flop loads the delayed
//     flop (delayed mode): the corrected word is sent one cycle late and every
//     later word gets ckd-ck extra settling time, so no further error occurs;
//   * raises corr_out for one cycle, telling the next stage (prev_corr) that
//     the word sent in the previous cycle was wrong.
// prev_corr from the previous stage means "the word you took at the last ck
// edge is wrong, the next one is its correct copy".  In normal mode the stage
// forwards it (it has already passed the wrong word on).  In delayed mode it
// resets sel and does not forward it: the wrong word is still in the delayed
// flop and is simply dropped, and the correct copy is taken straight from the
// wire, so the penalty is absorbed.  A stage also returns to normal mode when
// the word waiting in its delayed flop is not valid (end of a transfer).
//
// Timing: ck -> main flop; ckd (ck + up to half a cycle) -> delayed flop;
// ckdd (after ckd, before the next ck) -> sel and corr_out.  prev_corr must be
// stable at ckdd; corr_out changes at ckdd.  The structure (main/delayed flop,
// 2:1 mux, XOR, OR tree, set/reset latch, correction flop) follows the design;
// modelling the latch as a ckdd register, the valid line and the return to
// normal mode on an idle word are this implementation's choices.
module terror_stage #(
  parameter int unsigned W = terror_pkg::W_DEF
) (
  input  logic         ck,
  input  logic         ckd,
  input  logic         ckdd,
  input  logic         rst_n,
  input  logic [W:0]   d,          // arriving word, bit W = valid
  input  logic         prev_corr,  // previous stage/sender: last word was wrong
  output logic [W:0]   q,          // main flop, drives the next wire segment
  output logic         corr_out,   // to the next stage's prev_corr
  output logic         sel,        // 1 = delayed mode
  output logic         err         // timing error seen in this cycle (after ckd)
);
  logic [W:0] q_main, q_dly;
  logic [W:0] errq;

  // main flop with its 2:1 input mux
  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) q_main <= '0;
    else        q_main <= sel ? q_dly : d;

  // delayed flop: always samples the wire, at the late edge
  always_ff @(posedge ckd or negedge rst_n)
    if (!rst_n) q_dly <= '0;
    else        q_dly <= d;

  // per-bit comparison and OR tree; only meaningful in normal mode and for a
  // word that at least one copy marks as valid
  assign errq = q_main ^ q_dly;
  assign err  = (|errq) && !sel && (q_main[W] || q_dly[W]);

  // error-control circuit: set/reset latch (sel) and correction flop
  always_ff @(posedge ckdd or negedge rst_n)
    if (!rst_n) begin
      sel      <= 1'b0;
      corr_out <= 1'b0;
    end else begin
      corr_out <= err || (prev_corr && !sel);
      if (prev_corr)             sel <= 1'b0;
      else if (err)              sel <= 1'b1;
      else if (sel && !q_dly[W]) sel <= 1'b0;
    end

  assign q = q_main;
endmodule

// terror_control: error control circuit shared by the w bits of one buffer.
//
// err is the OR of the buffer's errq lines. The state latch (sel) is set
// when err = 1 and prev_corr = 0, and cleared when prev_corr = 1; prev_corr
// is corr_out of the upstream buffer (or of the sender for the first one).
// The correction flip-flop captures (~sel & err) | (~sel & prev_corr), so
// corr_out tells the next buffer that the word this buffer sent in the
// current cycle is wrong: either this buffer just missed a late transition
// (and enters delayed state to resend it), or it passed on a word the
// upstream buffer already marked wrong. A buffer in delayed state that
// receives prev_corr returns to normal state and drops the wrong word held
// in its delayed flip-flops instead of sending it, which removes the extra
// cycle it had added; it then raises no corr_out.
//
// The gate structure follows the document. The state latch is modelled as a
// flip-flop updated at ckdd, the same edge as the correction flip-flop,
// with clear taking priority over set: in the document the latch is enabled
// by a local clock derived from ck and ckd, whose exact phase is not given.
// The reset is this design's addition.
//
// Three assertions check the protocol rules; they are disabled during
// reset, so lint notes rst_n as both an asynchronous reset and a sampled
// signal, which is intended.
//
// Interface: errq[W] from the elements, prev_corr from upstream, ckdd, rst_n;
// sel (state, to the muxes), corr_out (to downstream), err (observability).
// Timing: err must settle between ckd and ckdd; sel and corr_out change at
// ckdd and are sampled downstream at the following ckdd.
module terror_control
  import terror_pkg::*;
#(
  parameter int unsigned W = LINK_WIDTH
) (
  input  logic         ckdd,
  input  logic         rst_n,
  input  logic [W-1:0] errq,
  input  logic         prev_corr,
  output logic         sel,
  output logic         corr_out,
  output logic         err
);
  timeunit 1ps; timeprecision 1ps;

  terror_state_e state;
  logic          set_s, corr_d;

  assign err    = |errq;
  assign set_s  = err & ~prev_corr;
  assign corr_d = (~sel & err) | (~sel & prev_corr);
  assign sel    = (state == ST_DELAYED);

  always_ff @(posedge ckdd or negedge rst_n)
    if (!rst_n)         state <= ST_NORMAL;
    else if (prev_corr) state <= ST_NORMAL;
    else if (set_s)     state <= ST_DELAYED;

  always_ff @(posedge ckdd or negedge rst_n)
    if (!rst_n) corr_out <= 1'b0;
    else        corr_out <= corr_d;

  // Rules of the correction protocol.
  // A correction received always returns the buffer to normal state.
  a_corr_clears: assert property (@(posedge ckdd) disable iff (!rst_n) prev_corr |=> !sel);
  // A buffer in delayed state never raises a correction.
  a_delayed_quiet: assert property (@(posedge ckdd) disable iff (!rst_n) sel |=> !corr_out);
  // An error seen in normal state is always flagged downstream.
  a_err_flagged: assert property (@(posedge ckdd) disable iff (!rst_n) (!sel && err) |=> corr_out);
endmodule

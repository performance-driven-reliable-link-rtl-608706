// terror_element: one bit of one Terror pipeline buffer.
//
// The bit is sampled twice per cycle. The delayed flip-flop captures the
// input at ckd, a copy of ck delayed by a fraction of the cycle, so a
// transition that arrives after ck but before ckd is still caught. The main
// flip-flop captures at ck through a 2:1 mux: with sel = 0 (normal state) it
// takes the wire directly, with sel = 1 (delayed state) it takes the delayed
// flip-flop, so the buffer forwards the late-but-correct sample one cycle
// later. errq is the XOR of the two flip-flops; in normal state it is high
// after ckd when the main flip-flop missed a late transition. errq has no
// meaning in delayed state and the control circuit ignores it there.
//
// Structure (mux, main flip-flop, delayed flip-flop, XOR) follows the
// document. The asynchronous active-low reset is this design's addition.
//
// Interface: ck, ckd clocks; rst_n; d input from the wire; sel from the
// control circuit; q to the next wire; errq to the buffer's OR.
// Timing: q changes at ck, dq at ckd; errq is valid from ckd to the next ck.
module terror_element (
  input  logic ck,
  input  logic ckd,
  input  logic rst_n,
  input  logic sel,
  input  logic d,
  output logic q,
  output logic errq
);
  timeunit 1ps; timeprecision 1ps;

  logic dq;  // delayed flip-flop

  always_ff @(posedge ckd or negedge rst_n)
    if (!rst_n) dq <= 1'b0;
    else        dq <= d;

  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= sel ? dq : d;

  assign errq = q ^ dq;
endmodule

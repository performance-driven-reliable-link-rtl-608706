// terror_pkg: constants and types shared by the timing-error-tolerant (Terror)
// link. The link is a W-bit bus pipelined through B buffers; each buffer bit
// has a main flip-flop on ck and a delayed flip-flop on ckd, and one error
// control circuit per buffer decides whether the buffer forwards the main
// sample (normal state) or the delayed sample (delayed state).
//
// Defaults follow the design point of the document: a 32-bit bus, a 12 mm
// link at 1 GHz cut into 4 Terror stages (3 mm each, 50% more than the 2 mm
// of a conservative design), ckd delayed by half a clock cycle. The ckdd
// delay, the wire delays and the reset are this design's own choices.
package terror_pkg;
  timeunit 1ps; timeprecision 1ps;

  parameter int unsigned LINK_WIDTH  = 32;   // bus width w
  parameter int unsigned LINK_STAGES = 4;    // Terror buffers b on the link

  // Timing of the behavioural clock and wire models, in ps.
  parameter int unsigned CLK_PERIOD_PS = 1000; // 1 GHz
  parameter int unsigned CKD_DELAY_PS  = 500;  // ckd: ck delayed by 50% of a cycle
  parameter int unsigned CKDD_DELAY_PS = 750;  // ckdd: after the err path has settled
  parameter int unsigned WIRE_NOM_PS   = 700;  // nominal segment delay (ckd < t < period)

  // State of one buffer, held in the SR latch of its control circuit and
  // used directly as the mux select of its terror elements.
  typedef enum logic {
    ST_NORMAL  = 1'b0,  // main flip-flop captures the wire at ck
    ST_DELAYED = 1'b1   // delayed flip-flop captures at ckd, main sends it at the next ck
  } terror_state_e;
endpackage

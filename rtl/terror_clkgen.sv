// terror_clkgen: behavioural model of the local delay chain of one Terror
// buffer. It is not synthesizable logic: in silicon it is a chain of
// inverters next to the buffer; here it is modelled with transport delays.
//
// ckd is ck delayed by CKD_DELAY_PS. The document delays ckd by half a
// clock cycle (timing overheads leave about 53% of the cycle usable, rounded
// down to 50%). ckdd is ck delayed by CKDD_DELAY_PS; the document gives only
// its lower bound (the sel path), so 75% of the cycle, after the err path
// has settled and before the next ck, is this design's choice.
//
// Interface: ck in; ckd, ckdd out. Timing: each output repeats every edge of
// ck after its fixed delay; both outputs are low until the first delayed
// edge of ck.
module terror_clkgen
  import terror_pkg::*;
#(
  parameter int unsigned CKD_PS  = CKD_DELAY_PS,
  parameter int unsigned CKDD_PS = CKDD_DELAY_PS
) (
  input  logic ck,
  output logic ckd,
  output logic ckdd
);
  timeunit 1ps; timeprecision 1ps;

  initial begin
    ckd  = 1'b0;
    ckdd = 1'b0;
  end

  // Transport delay: each edge of ck schedules the matching edge of the
  // outputs; the delay is below the clock period, so edges never overlap.
  always @(posedge ck) begin
    ckd  <= #(CKD_PS)  1'b1;
    ckdd <= #(CKDD_PS) 1'b1;
  end

  always @(negedge ck) begin
    ckd  <= #(CKD_PS)  1'b0;
    ckdd <= #(CKDD_PS) 1'b0;
  end
endmodule

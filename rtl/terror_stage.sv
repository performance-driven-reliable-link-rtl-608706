// terror_stage: one Terror pipeline buffer of a W-bit link.
//
// W terror elements sample the incoming wire bits; their errq outputs are
// ORed in one shared error control circuit, whose sel drives all W muxes.
// Sharing one control circuit per buffer (a column of the link) keeps the
// cost low and means all bits of a buffer change state together, so no
// synchronisation is needed at the receiver. Structure follows the document.
//
// Interface: ck, ckd, ckdd from the buffer's local clock generator; rst_n;
// d[W] and prev_corr from the upstream wire and buffer; q[W] and corr_out to
// the downstream ones; state and err for observation.
// Timing: normal state, q = d sampled at ck (one cycle per buffer); delayed
// state, q = d sampled at ckd, sent at the next ck (two cycles per buffer).
module terror_stage
  import terror_pkg::*;
#(
  parameter int unsigned W = LINK_WIDTH
) (
  input  logic         ck,
  input  logic         ckd,
  input  logic         ckdd,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         prev_corr,
  output logic [W-1:0] q,
  output logic         corr_out,
  output logic         state,
  output logic         err
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] errq;
  logic         sel;

  for (genvar i = 0; i < W; i++) begin : g_bit
    terror_element u_elem (
      .ck   (ck),
      .ckd  (ckd),
      .rst_n(rst_n),
      .sel  (sel),
      .d    (d[i]),
      .q    (q[i]),
      .errq (errq[i])
    );
  end

  terror_control #(.W(W)) u_ctrl (
    .ckdd     (ckdd),
    .rst_n    (rst_n),
    .errq     (errq),
    .prev_corr(prev_corr),
    .sel      (sel),
    .corr_out (corr_out),
    .err      (err)
  );

  assign state = sel;
endmodule

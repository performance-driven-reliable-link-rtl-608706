// terror_link: a W-bit on-chip link made timing-error tolerant.
//
// The sender drives the first of B wire segments; each segment ends in a
// Terror buffer (terror_stage) clocked by its own delay-chain clock
// generator, and the last buffer feeds the look-ahead receiver. The
// correction flags travel beside the data: prev_corr of buffer s is
// corr_out of buffer s-1, and tx_corr is the first buffer's prev_corr.
//
// Without errors a word needs B cycles through the buffers and one in the
// receiver. A buffer that misses a late transition resends the word from
// its delayed flip-flops and stays one cycle behind (delayed state); the
// wrong copy is flagged and dropped either by the next buffer that is in
// delayed state (which thereby catches up) or by the receiver. The extra
// latency of a stream is therefore at most B cycles whatever the error rate.
//
// Defaults: 32 bits and 4 buffers for a 12 mm link at 1 GHz, as in the
// document. The wire segments and clock generators are behavioural models
// with transport delays; the buffers and the receiver are synthesizable.
//
// Interface: ck (1 GHz), rst_n (asynchronous, active low); tx_data and
// tx_corr from the sender; noise[s][i] makes the next transition of bit i
// on segment s late; rec_data/rec_valid out of the receiver; per-buffer
// state, err and corr for observation.
module terror_link
  import terror_pkg::*;
#(
  parameter int unsigned W = LINK_WIDTH,
  parameter int unsigned B = LINK_STAGES
) (
  input  logic                ck,
  input  logic                rst_n,
  input  logic [W-1:0]        tx_data,
  input  logic                tx_corr,
  input  logic [B-1:0][W-1:0] noise,
  output logic [W-1:0]        rec_data,
  output logic                rec_valid,
  output logic [B-1:0]        stage_state,
  output logic [B-1:0]        stage_err,
  output logic [B-1:0]        stage_corr
);
  timeunit 1ps; timeprecision 1ps;

  logic [B:0][W-1:0] seg_in;    // wire segment inputs; seg_in[B] = last buffer output
  logic [B-1:0][W-1:0] seg_out; // wire segment outputs = buffer inputs
  logic [B:0]        corr;      // corr[0] = tx_corr, corr[s+1] = buffer s corr_out
  logic [B-1:0]      ckd, ckdd;

  assign seg_in[0] = tx_data;
  assign corr[0]   = tx_corr;

  for (genvar s = 0; s < B; s++) begin : g_stage
    link_wire #(.W(W)) u_wire (
      .in   (seg_in[s]),
      .noise(noise[s]),
      .out  (seg_out[s])
    );

    terror_clkgen u_clk (
      .ck  (ck),
      .ckd (ckd[s]),
      .ckdd(ckdd[s])
    );

    terror_stage #(.W(W)) u_buf (
      .ck       (ck),
      .ckd      (ckd[s]),
      .ckdd     (ckdd[s]),
      .rst_n    (rst_n),
      .d        (seg_out[s]),
      .prev_corr(corr[s]),
      .q        (seg_in[s+1]),
      .corr_out (corr[s+1]),
      .state    (stage_state[s]),
      .err      (stage_err[s])
    );
  end

  assign stage_corr = corr[B:1];

  lookahead_receiver #(.W(W)) u_rx (
    .ck       (ck),
    .rst_n    (rst_n),
    .data     (seg_in[B]),
    .corr_in  (corr[B]),
    .rec_out  (rec_data),
    .rec_valid(rec_valid)
  );
endmodule

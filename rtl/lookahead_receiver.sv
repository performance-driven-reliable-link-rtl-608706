// lookahead_receiver: end receiver of a Terror link.
//
// A buffer that misses a late transition sends a wrong word and raises its
// correction flag half a cycle later, together with the word. The receiver
// therefore looks one cycle ahead: it holds each arriving word in a register
// for one cycle, by which time the word's flag (corr_in, the corr_out of the
// last buffer) is known, and delivers the word with rec_valid = 0 when it
// was flagged as wrong. The corrected copy follows in a later cycle, so the
// valid words come out complete and in order. The register adds one cycle,
// paid once per stream since later words follow in pipeline fashion.
//
// The document gives the function and the signal names (data, corr_in,
// rec_out); the valid flag and the reset are this design's choices.
//
// Interface: ck, rst_n; data[W] and corr_in from the last buffer; rec_out[W]
// and rec_valid. Timing: data and corr_in are sampled together at ck;
// rec_out and rec_valid change at ck.
module lookahead_receiver
  import terror_pkg::*;
#(
  parameter int unsigned W = LINK_WIDTH
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic [W-1:0] data,
  input  logic         corr_in,
  output logic [W-1:0] rec_out,
  output logic         rec_valid
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) begin
      rec_out   <= '0;
      rec_valid <= 1'b0;
    end else begin
      rec_out   <= data;
      rec_valid <= ~corr_in;
    end
endmodule

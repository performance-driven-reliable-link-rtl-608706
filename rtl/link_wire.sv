// link_wire: behavioural model of one repeated global wire segment of the
// link, between two buffers. It is not synthesizable logic: it stands for
// the buffered interconnect and its delay variation.
//
// Every transition of bit i reaches the output after one of three delays:
//  - NOM_PS, the nominal delay the link is designed for;
//  - XT_PS (by default 1.5 x NOM_PS) when both neighbours of bit i switch in
//    the opposite direction in the same word, the 101->010 / 010->101
//    crosstalk pattern that the document says adds 50% to the wire delay;
//  - NOISE_PS when noise[i] is high at the moment the bit switches, standing
//    for other interference.
// With the default 1 GHz clock and ckd at 500 ps, NOM_PS = 700 ps lands
// between ckd and the next ck (so the delayed flip-flop never takes the next
// word), and both 1050 ps and 1300 ps land after the next ck but before the
// next ckd: these are the timing errors a Terror buffer corrects. The delay
// values are this design's choice. Edge bits have one neighbour and never see
// the crosstalk pattern.
//
// Each transition is delivered by its own forked process after a delay
// chosen when the bit switches (a transport delay), so the delay is a
// run-time value and the delivery is a blocking assignment inside the
// edge-triggered block; lint notes both, and both are intended here. The
// process-per-transition form is used because an intra-assignment delay
// chosen in an if/else is not delivered reliably by every simulator.
//
// Interface: in[W], noise[W] in; out[W] out. noise should change away from
// the clock edge at which in changes.
module link_wire
  import terror_pkg::*;
#(
  parameter int unsigned W        = LINK_WIDTH,
  parameter int unsigned NOM_PS   = WIRE_NOM_PS,
  parameter int unsigned XT_PS    = WIRE_NOM_PS * 3 / 2,
  parameter int unsigned NOISE_PS = 1300
) (
  input  logic [W-1:0] in,
  input  logic [W-1:0] noise,
  output logic [W-1:0] out
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] last;   // value before the current change

  initial begin
    last = '0;
    out  = '0;
  end

  // last follows in 1 ps later, so at a transition it still holds the old word.
  always @(in) last <= #1 in;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic lo_fall, hi_fall, lo_rise, hi_rise;  // neighbour transitions
    if (i > 0 && i < W - 1) begin : g_mid
      assign lo_fall = last[i-1] & ~in[i-1];
      assign hi_fall = last[i+1] & ~in[i+1];
      assign lo_rise = ~last[i-1] & in[i-1];
      assign hi_rise = ~last[i+1] & in[i+1];
    end else begin : g_edge
      assign {lo_fall, hi_fall, lo_rise, hi_rise} = '0;
    end

    // Each transition is delivered by its own process after its delay.
    always @(posedge in[i]) begin
      automatic int unsigned dl = noise[i] ? NOISE_PS : ((lo_fall && hi_fall) ? XT_PS : NOM_PS);
      fork
        begin
          #(dl) out[i] = 1'b1;
        end
      join_none
    end

    always @(negedge in[i]) begin
      automatic int unsigned dl = noise[i] ? NOISE_PS : ((lo_rise && hi_rise) ? XT_PS : NOM_PS);
      fork
        begin
          #(dl) out[i] = 1'b0;
        end
      join_none
    end
  end
endmodule

// tb_lookahead_receiver: self-checking test of the end receiver (W = 32).
// Random words and correction flags are applied between ck edges; after
// each edge rec_out must equal the word of that edge and rec_valid must be
// the inverse of its flag, with exactly one cycle of latency.
module tb_lookahead_receiver;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 32;

  logic ck = 0, rst_n = 1, corr_in = 0;
  logic [W-1:0] data = '0, rec_out;
  logic rec_valid;
  int checks = 0, failures = 0, drops = 0;

  lookahead_receiver #(.W(W)) dut (.ck, .rst_n, .data, .corr_in, .rec_out, .rec_valid);

  always #500 ck = ~ck;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w;
    logic c;
    #10 rst_n = 0;
    #100;
    check(rec_valid, '0, "rec_valid in reset");
    check(rec_out, '0, "rec_out in reset");
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge ck);
      w = $urandom;
      c = (($urandom % 4) == 0);
      data = w;
      corr_in = c;
      @(posedge ck);
      #1;
      check(rec_out, w, "rec_out");
      check(W'(rec_valid), W'(!c), "rec_valid");
      if (c) drops++;
      #400;
      check(rec_out, w, "rec_out held for the cycle");
    end
    check(W'(drops > 0), W'(1), "flagged words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

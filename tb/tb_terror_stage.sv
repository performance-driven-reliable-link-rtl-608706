// tb_terror_stage: self-checking test of one Terror buffer (W = 32).
//
// The testbench plays the upstream wire and buffer. Word k is driven 700 ps
// after ck edge k-1 (on time for ck edge k) or, when made late, 200 ps after
// ck edge k (after ck, before ckd at +500 ps), and one random bit of it
// differs from the previous word so the late transition is visible. ckd and
// ckdd are ck delayed by 500 and 750 ps. prev_corr pulses are driven between
// ckdd and the next ck.
// Checks:
//  * a word-level reference model of the buffer (mux, two flip-flops, OR,
//    state latch, correction flip-flop), fed with the same inputs;
//  * in phase 1 (no prev_corr) the words the buffer sends without a
//    correction flag are exactly the words sent to it, in order: a late
//    word is flagged, resent one cycle later, and the lag is kept;
//  * in phase 2 a prev_corr in delayed state brings the buffer back to
//    normal state without sending the word held in its delayed flip-flops.
module tb_terror_stage;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 32;

  logic ck = 0, ckd = 0, ckdd = 0, rst_n = 1, prev_corr = 0;
  logic [W-1:0] d = '0, q;
  logic corr_out, state, err;
  int checks = 0, failures = 0;

  terror_stage #(.W(W)) dut (.ck, .ckd, .ckdd, .rst_n, .d, .prev_corr, .q, .corr_out, .state, .err);

  always #500 ck = ~ck;
  always @(ck) begin
    ckd  <= #500 ck;
    ckdd <= #750 ck;
  end

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

  // Reference model, sampled at the buffer's own clock edges.
  logic [W-1:0] r_q = '0, r_dq = '0;
  logic r_sel = 0, r_corr = 0, r_err;
  always @(posedge ck)   if (rst_n) r_q = r_sel ? r_dq : d;
  always @(posedge ckd)  if (rst_n) r_dq = d;
  always @(posedge ckdd) if (rst_n) begin
    r_err  = (r_q != r_dq);
    r_corr = !r_sel && (r_err || prev_corr);
    r_sel  = prev_corr ? 1'b0 : (r_err ? 1'b1 : r_sel);
  end

  // Compare just before each ck edge (outputs settled for the cycle).
  int n_enter = 0, n_absorb = 0, n_fwd = 0;
  logic prev_state = 0;
  always @(posedge ck) if (rst_n) begin
    #900;
    check(q, r_q, "q");
    check(W'(state), W'(r_sel), "state");
    check(W'(corr_out), W'(r_corr), "corr_out");
  end
  always @(posedge ckdd) if (rst_n) begin
    #10;
    if (!prev_state && state) n_enter++;
    if (prev_state && !state) n_absorb++;
    if (corr_out && !err && !prev_state) n_fwd++;
    prev_state = state;
  end

  // Stream of unflagged output words (phase 1).
  logic [W-1:0] sent[$], got[$];
  logic phase1 = 1;
  always @(posedge ck) if (rst_n && phase1) begin
    #900;
    if (!corr_out && q != '0) got.push_back(q);
  end

  initial begin
    logic [W-1:0] w;
    int late;
    #10 rst_n = 0;
    #100 rst_n = 1;
    w = 32'h0000_0001;
    @(posedge ck);
    // Phase 1: late words only.
    for (int k = 0; k < 400; k++) begin
      w = w ^ (W'(1) << ($urandom % W));
      if (w == '0) w = 32'h8000_0000;
      sent.push_back(w);
      late = (($urandom % 6) == 0);
      if (late) begin
        @(posedge ck); #200 d = w;         // arrives after ck, before ckd
      end else begin
        #700 d = w; @(posedge ck);         // arrives before next ck
      end
    end
    repeat (6) @(posedge ck);
    phase1 = 0;
    #950;
    check(W'(got.size() >= sent.size()), W'(1), "all words delivered");
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(got[i], sent[i], "unflagged stream");
    // Phase 2: late words and prev_corr pulses.
    for (int k = 0; k < 600; k++) begin
      w = w ^ (W'(1) << ($urandom % W));
      late = (($urandom % 5) == 0);
      if (late) begin
        @(posedge ck); #200 d = w;
        #600 prev_corr = (($urandom % 3) == 0);
      end else begin
        #700 d = w;
        #100 prev_corr = (($urandom % 3) == 0);
        @(posedge ck);
      end
    end
    repeat (3) @(posedge ck);
    check(W'(n_enter > 0), W'(1), "normal->delayed happened");
    check(W'(n_absorb > 0), W'(1), "delayed->normal happened");
    check(W'(n_fwd > 0), W'(1), "correction forwarded");
    $display("enter %0d absorb %0d forward %0d", n_enter, n_absorb, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

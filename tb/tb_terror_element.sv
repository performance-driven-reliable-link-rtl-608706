// tb_terror_element: self-checking test of one Terror bit.
//
// Each cycle the testbench applies a value before ck, a possibly different
// value between ck and ckd (a late transition), and a random sel, using
// explicit ck and ckd edges 500 ps apart. A reference model computes the
// main flip-flop (mux then ck), the delayed flip-flop (ckd) and errq, and
// the outputs are compared after ckd. It also checks that an on-time input
// never raises errq in normal state and that a late one always does.
module tb_terror_element;
  timeunit 1ps; timeprecision 1ps;

  logic ck = 0, ckd = 0, rst_n = 1, sel = 0, d = 0;
  logic q, errq;
  int checks = 0, failures = 0;
  logic ref_q = 0, ref_dq = 0;
  int late_err = 0, ontime_err = 0;

  terror_element dut (.ck, .ckd, .rst_n, .sel, .d, .q, .errq);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic d_early, d_late, s;
    #10 rst_n = 0;
    #100 rst_n = 1;
    #100;
    check(q, 1'b0, "q after reset");
    check(errq, 1'b0, "errq after reset");
    for (int n = 0; n < 2000; n++) begin
      d_early = 1'($urandom);
      d_late  = (($urandom % 4) == 0) ? ~d_early : d_early;
      s       = (n < 200) ? 1'b0 : 1'($urandom);
      d   = d_early;
      sel = s;
      #200 ck = 1;                       // main flip-flop edge
      ref_q = s ? ref_dq : d_early;
      #100 d = d_late;                   // late transition, before ckd
      #200 ckd = 1;                      // delayed flip-flop edge
      ref_dq = d_late;
      #50;
      check(q, ref_q, "q");
      check(errq, ref_q ^ ref_dq, "errq");
      if (!s && d_late != d_early) begin
        check(errq, 1'b1, "late transition flagged in normal state");
        late_err++;
      end
      if (!s && d_late == d_early) begin
        check(errq, 1'b0, "on-time input not flagged");
        ontime_err++;
      end
      #200 ck = 0;
      #250 ckd = 0;
    end
    check(late_err > 0, 1'b1, "late transitions were exercised");
    $display("late transitions %0d, on-time samples %0d", late_err, ontime_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

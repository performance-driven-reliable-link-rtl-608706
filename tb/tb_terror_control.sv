// tb_terror_control: self-checking test of the error control circuit.
//
// Random errq vectors and prev_corr values are applied between ckdd edges.
// A reference model applies the rules of the circuit independently: err is
// "any errq bit set"; at ckdd the state clears on prev_corr, otherwise sets
// on err; corr_out is raised when the buffer was in normal state and either
// err or prev_corr was high. The testbench counts each transition kind
// (normal->delayed, delayed->normal, forwarded correction) and fails if one
// never happened.
module tb_terror_control;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 32;

  logic ckdd = 0, rst_n = 1, prev_corr = 0;
  logic [W-1:0] errq = '0;
  logic sel, corr_out, err;
  int checks = 0, failures = 0;
  logic ref_sel = 0, ref_corr = 0;
  int n_set = 0, n_clear = 0, n_fwd = 0;

  terror_control #(.W(W)) dut (.ckdd, .rst_n, .errq, .prev_corr, .sel, .corr_out, .err);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    #10 rst_n = 0;
    #100 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      errq      = (($urandom % 3) == 0) ? (W'(1) << ($urandom % W)) : '0;
      prev_corr = (($urandom % 4) == 0);
      #100;
      e = (errq != '0);
      check(err, e, "err is OR of errq");
      check(sel, ref_sel, "sel before edge");
      #400 ckdd = 1;
      // reference update
      ref_corr = !ref_sel && (e || prev_corr);
      if (!ref_sel && !prev_corr && e) n_set++;
      if (ref_sel && prev_corr) n_clear++;
      if (!ref_sel && prev_corr) n_fwd++;
      if (prev_corr) ref_sel = 1'b0;
      else if (e)    ref_sel = 1'b1;
      #10;
      check(sel, ref_sel, "sel after ckdd");
      check(corr_out, ref_corr, "corr_out after ckdd");
      #490 ckdd = 0;
    end
    check(n_set > 0, 1'b1, "normal->delayed seen");
    check(n_clear > 0, 1'b1, "delayed->normal seen");
    check(n_fwd > 0, 1'b1, "forwarded correction seen");
    $display("set %0d clear %0d forward %0d", n_set, n_clear, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

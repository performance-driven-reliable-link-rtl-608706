// tb_terror_clkgen: self-checking test of the delay-chain clock model.
// A 1 GHz ck is applied; the time of every rising and falling edge of ckd
// and ckdd is compared with the matching ck edge plus 500 ps and 750 ps.
module tb_terror_clkgen;
  timeunit 1ps; timeprecision 1ps;

  logic ck = 0, ckd, ckdd;
  int checks = 0, failures = 0;
  realtime t_rise[$], t_fall[$];

  terror_clkgen dut (.ck, .ckd, .ckdd);

  always #500 ck = ~ck;
  always @(posedge ck) t_rise.push_back($realtime);
  always @(negedge ck) t_fall.push_back($realtime);

  task automatic check_t(input realtime got, input realtime exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: edge at %0t, expected %0t", what, got, exp);
    end
  endtask

  int nd = 0, ndd = 0, fd = 0, fdd = 0;
  always @(posedge ckd)  if ($realtime > 1) begin check_t($realtime, t_rise[nd]  + 500.0, "ckd rise");  nd++;  end
  always @(posedge ckdd) if ($realtime > 1) begin check_t($realtime, t_rise[ndd] + 750.0, "ckdd rise"); ndd++; end
  always @(negedge ckd)  if ($realtime > 1) begin check_t($realtime, t_fall[fd]  + 500.0, "ckd fall");  fd++;  end
  always @(negedge ckdd) if ($realtime > 1) begin check_t($realtime, t_fall[fdd] + 750.0, "ckdd fall"); fdd++; end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100200;
    checks++;
    if (nd < 99 || ndd < 99) begin
      failures++;
      $display("FAIL too few edges: ckd %0d ckdd %0d", nd, ndd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

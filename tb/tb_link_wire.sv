// tb_link_wire: self-checking test of the wire-segment delay model (W = 8).
// Single-bit transitions must arrive after the nominal 700 ps; the
// 101->010 and 010->101 neighbour patterns must slow the middle bit to
// 1050 ps while the neighbours stay nominal; a transition with noise high
// must arrive after 1300 ps. Arrival times are measured per bit.
module tb_link_wire;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 8;

  logic [W-1:0] in = '0, noise = '0, out;
  int checks = 0, failures = 0;
  realtime t_arr[W];
  int n_xt = 0;

  link_wire #(.W(W)) dut (.in, .noise, .out);

  logic [W-1:0] out_prev = '0;
  always @(out) begin
    for (int i = 0; i < W; i++)
      if (out[i] != out_prev[i]) t_arr[i] = $realtime;
    out_prev = out;
  end

  task automatic check_t(input realtime got, input realtime exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: arrival after %0t, expected %0t", what, got, exp);
    end
  endtask

  // Apply a new word, wait 2 ns, check every bit that changed.
  task automatic apply(input logic [W-1:0] v, input logic [W-1:0] nz, input realtime exp[W]);
    realtime t0;
    logic [W-1:0] chg;
    noise = nz;
    #10;
    chg = v ^ in;
    t0 = $realtime;
    in = v;
    #2000;
    for (int i = 0; i < W; i++)
      if (chg[i]) check_t(t_arr[i] - t0, exp[i], $sformatf("bit %0d", i));
    checks++;
    if (out !== v) begin
      failures++;
      $display("FAIL settled value %b exp %b", out, v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime e[W];
    #3000;
    foreach (e[i]) e[i] = 700.0;
    apply(8'b0000_0001, '0, e);                  // single bit, nominal
    apply(8'b0000_0000, '0, e);
    apply(8'b0000_0101, '0, e);                  // 000 -> 101: all same direction
    e[1] = 1050.0;
    apply(8'b0000_0010, '0, e);                  // 101 -> 010: bit 1 slowed
    apply(8'b0000_0101, '0, e);                  // 010 -> 101: bit 1 slowed
    n_xt += 2;
    foreach (e[i]) e[i] = 700.0;
    e[4] = 1300.0;
    apply(8'b0001_0101, 8'b0001_0000, e);        // bit 4 with noise
    foreach (e[i]) e[i] = 700.0;
    apply(8'b0001_0100, '0, e);
    e[3] = 1050.0;
    apply(8'b0000_1000, '0, e);                  // bits 4..2: 101 -> 010, bit 3 slowed
    n_xt++;
    $display("crosstalk patterns applied %0d", n_xt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

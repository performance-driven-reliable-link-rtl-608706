// tb_terror_workloads: receiver latency of the default Terror link
// (32 bits, 4 buffers, 1 GHz) for the stream sizes and error rates of the
// evaluation: 1000 words at 1%, 3% and 5%; 50 to 600 words at 0.5% to 4%;
// 10000 words at 1% and 5%.
//
// Error rate here means: for each buffer and each cycle, the probability
// that the word arriving at that buffer has a late transition (noise on the
// wire segment before it). The data are Gray-coded, so exactly one bit
// switches per word and the crosstalk pattern never occurs: every late
// transition comes from the injected noise.
// For each run the link is reset, N words are launched on N consecutive
// cycles, and the latency is counted from the first launch to the arrival
// of the last word at the receiver. An error-free run takes N + B cycles;
// the penalty is the excess. Checks: every word arrives once and in order,
// and the penalty never exceeds B, whatever N and the error rate.
module tb_terror_workloads;
  timeunit 1ps; timeprecision 1ps;
  import terror_pkg::*;
  localparam int W = LINK_WIDTH;
  localparam int B = LINK_STAGES;

  logic ck = 0, rst_n = 1, tx_corr = 0;
  logic [W-1:0] tx_data = '0;
  logic [B-1:0][W-1:0] noise = '0;
  logic [W-1:0] rec_data;
  logic rec_valid;
  logic [B-1:0] stage_state, stage_err, stage_corr;

  terror_link dut (
    .ck, .rst_n, .tx_data, .tx_corr, .noise,
    .rec_data, .rec_valid, .stage_state, .stage_err, .stage_corr
  );

  always #(CLK_PERIOD_PS / 2) ck = ~ck;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(CLK_PERIOD_PS * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cyc_now();
    return int'(($time + CLK_PERIOD_PS / 2) / CLK_PERIOD_PS);
  endfunction

  function automatic logic [W-1:0] gray(input int unsigned n);
    return W'(n ^ (n >> 1));
  endfunction

  // Noise injection (per mille per buffer per cycle).
  int p_noise = 0;
  int n_late = 0;
  always @(negedge ck) begin
    for (int s = 0; s < B; s++) begin
      noise[s] = (($urandom % 1000) < p_noise) ? '1 : '0;
      if (noise[s] != '0) n_late++;
    end
  end

  // Receiver: expected words and arrival of the last one.
  logic [W-1:0] exp_q[$];
  logic collecting = 0, started = 0;
  int n_recv = 0, t_last = 0;
  always @(negedge ck) if (rst_n && collecting && rec_valid) begin
    if (!started && rec_data == '0) begin
      // reset contents of the pipeline
    end else if (exp_q.size() != 0) begin
      started = 1;
      check(rec_data == exp_q[0], $sformatf("word %h expected %h", rec_data, exp_q[0]));
      void'(exp_q.pop_front());
      n_recv++;
      t_last = cyc_now();
    end
  end

  int unsigned gn = 1;
  int max_pen_all = 0;

  task automatic run(input int n_words, input int permille, output int latency);
    int t_first, pen;
    rst_n = 0;
    p_noise = 0;
    tx_data <= '0;
    repeat (2) @(posedge ck);
    rst_n = 1;
    repeat (B + 3) @(posedge ck);
    exp_q.delete();
    started = 0;
    n_recv = 0;
    collecting = 1;
    p_noise = permille;
    t_first = 0;
    for (int k = 0; k < n_words; k++) begin
      @(posedge ck);
      tx_data <= gray(gn);
      exp_q.push_back(gray(gn));
      if (k == 0) t_first = cyc_now();
      gn++;
      if (gn > 32'h7FFF_FFFF) gn = 1;
    end
    p_noise = 0;
    repeat (2 * B + 4) @(posedge ck);
    @(negedge ck);
    #10;
    collecting = 0;
    check(n_recv == n_words, $sformatf("received %0d of %0d", n_recv, n_words));
    latency = t_last - t_first;
    pen = latency - (n_words + B);
    check(pen >= 0 && pen <= B, $sformatf("penalty %0d", pen));
    if (pen > max_pen_all) max_pen_all = pen;
    $display("N=%0d  error rate %0d.%0d%%  receiver latency %0d cycles  penalty %0d",
             n_words, permille / 10, permille % 10, latency, pen);
  endtask

  initial begin
    int lat;
    int sizes[8] = '{50, 100, 150, 200, 300, 400, 500, 600};
    int rates[6] = '{5, 10, 15, 20, 30, 40};
    int lat0;
    #10 rst_n = 0;
    #100;
    // Error-free reference.
    run(1000, 0, lat0);
    check(lat0 == 1000 + B, "error-free latency of 1000 words");
    // 1000 words at 1%, 3%, 5%.
    run(1000, 10, lat);
    run(1000, 30, lat);
    run(1000, 50, lat);
    // Penalty against data size.
    foreach (rates[r])
      foreach (sizes[i])
        run(sizes[i], rates[r], lat);
    // Large streams.
    run(5000, 10, lat);
    run(10000, 10, lat);
    run(10000, 50, lat);
    check(n_late > 0, "late transitions injected");
    check(max_pen_all > 0, "a penalty was observed");
    $display("largest penalty %0d cycles (bound %0d)", max_pen_all, B);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

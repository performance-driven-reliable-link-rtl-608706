// tb_terror_link: end-to-end test of the Terror link at its default size
// (32-bit bus, 4 buffers, 1 GHz clock, ckd at 50% of the cycle).
//
// The sender launches one word per cycle in three phases:
//  A. 1000 Gray-coded words (one bit changes per word, so no crosstalk)
//     with random noise on the wire segments: each segment, each cycle,
//     is made late with 3% probability;
//  B. 1000 random words: the 101->010 crosstalk pattern now slows bits by
//     itself, plus 1% noise;
//  C. 300 Gray-coded words during which the sender now and then launches a
//     junk word with tx_corr raised and then launches the right word.
// Checks: the words the receiver marks valid are exactly the words sent
// (junk excluded), in order; an error-free word takes B+1 cycles (B
// buffers, one look-ahead cycle); no word is later than that by more than
// B cycles, whatever the error rate. Each mechanism (late transition by
// noise and by crosstalk, normal->delayed, correction forwarded by a normal
// buffer, absorption by a delayed buffer, word dropped at the receiver,
// sender-side correction) is counted and must occur at least once.
module tb_terror_link;
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
    #(CLK_PERIOD_PS * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Number of rising edges of ck so far (the first is at half a period).
  function automatic int cyc_now();
    return int'(($time + CLK_PERIOD_PS / 2) / CLK_PERIOD_PS);
  endfunction

  // Expected stream.
  typedef struct { logic [W-1:0] w; int t; } sent_t;
  sent_t exp_q[$];

  // Mechanism counters.
  int n_noise = 0, n_xt = 0, n_enter = 0, n_absorb = 0, n_fwd = 0, n_drop = 0, n_txcorr = 0;
  int max_pen = 0, min_lat = 1 << 30, n_recv = 0;
  int p_noise = 30;   // per mille
  logic started = 0;

  // Noise: changed at the falling edge, sampled by the wires at the rising edge.
  always @(negedge ck) begin
    for (int s = 0; s < B; s++) begin
      noise[s] = (($urandom % 1000) < p_noise) ? '1 : '0;
      if (noise[s] != '0) n_noise++;
    end
  end

  // Crosstalk pattern on the first segment, from the sender's words.
  logic [W-1:0] tx_prev = '0;
  always @(posedge ck) begin
    #1;
    for (int i = 1; i < W - 1; i++)
      if ((tx_prev[i-1 +: 3] == 3'b101 && tx_data[i-1 +: 3] == 3'b010) ||
          (tx_prev[i-1 +: 3] == 3'b010 && tx_data[i-1 +: 3] == 3'b101)) n_xt++;
    tx_prev = tx_data;
  end

  // Buffer state changes and corrections, sampled after ckdd.
  logic [B-1:0] st_prev = '0, corr_prev = '0;
  always @(posedge ck) if (rst_n) begin
    #(CKDD_DELAY_PS + 50);
    for (int s = 0; s < B; s++) begin
      if (!st_prev[s] && stage_state[s]) n_enter++;
      if (st_prev[s] && !stage_state[s]) n_absorb++;
      if (s > 0 && stage_corr[s] && corr_prev[s-1] && !st_prev[s]) n_fwd++;
    end
    st_prev   = stage_state;
    corr_prev = stage_corr;
  end

  logic [W-1:0] last_sent = '0;

  // Receiver side: compare valid words with the expected stream.
  always @(negedge ck) if (rst_n) begin
    if (!rec_valid) begin
      if (started) n_drop++;
    end else if (!started && rec_data == '0) begin
      // words from before the first launch
    end else begin
      started = 1;
      if (exp_q.size() == 0) begin
        // The link carries a word every cycle: once the sender stops it
        // holds its last word, which keeps arriving.
        check(rec_data == last_sent, "idle link repeats the last word");
      end else begin
        sent_t e;
        int lat;
        e = exp_q.pop_front();
        check(rec_data == e.w, $sformatf("word %h expected %h", rec_data, e.w));
        lat = cyc_now() - e.t;   // sampled half a cycle after the edge
        if (lat < min_lat) min_lat = lat;
        if (lat - (B + 1) > max_pen) max_pen = lat - (B + 1);
        check(lat >= B + 1 && lat <= 2 * B + 1, $sformatf("latency %0d cycles", lat));
        n_recv++;
      end
    end
  end

  task automatic send(input logic [W-1:0] w);
    @(posedge ck);
    tx_data <= w;
    last_sent = w;
    exp_q.push_back('{w, cyc_now()});
  endtask

  function automatic logic [W-1:0] gray(input int unsigned n);
    return W'(n ^ (n >> 1));
  endfunction

  initial begin
    int unsigned n = 1;
    int total = 0;
    #10 rst_n = 0;
    #(CLK_PERIOD_PS * 3) rst_n = 1;
    repeat (5) @(posedge ck);
    // Phase A
    p_noise = 30;
    for (int k = 0; k < 1000; k++) begin send(gray(n)); n++; end
    // Phase B
    p_noise = 10;
    for (int k = 0; k < 1000; k++) begin
      logic [W-1:0] w;
      w = $urandom;
      if (w == '0) w = 1;
      send(w);
    end
    // Phase C
    p_noise = 20;
    for (int k = 0; k < 300; k++) begin
      if ((k % 25) == 10) begin
        @(posedge ck);
        tx_data <= ~gray(n) ^ 32'h5A5A_0000;   // junk word
        #(CKDD_DELAY_PS + 50) tx_corr = 1;
        send(gray(n));
        #(CKDD_DELAY_PS + 50) tx_corr = 0;
        n_txcorr++;
      end else begin
        send(gray(n));
      end
      n++;
    end
    total = 2300;
    p_noise = 0;
    repeat (3 * B + 10) @(posedge ck);
    @(negedge ck);
    #10;
    check(exp_q.size() == 0, $sformatf("%0d words never delivered", exp_q.size()));
    check(n_recv == total, $sformatf("received %0d of %0d", n_recv, total));
    check(min_lat == B + 1, $sformatf("error-free latency %0d, expected %0d", min_lat, B + 1));
    check(max_pen <= B, "penalty bounded by the number of buffers");
    check(n_noise  > 0, "noise-induced late transitions");
    check(n_xt     > 0, "crosstalk patterns");
    check(n_enter  > 0, "normal->delayed transitions");
    check(n_absorb > 0, "delayed->normal absorptions");
    check(n_fwd    > 0, "corrections forwarded");
    check(n_drop   > 0, "words dropped at the receiver");
    check(n_txcorr > 0, "sender-side corrections");
    $display("words %0d, min latency %0d, max penalty %0d", n_recv, min_lat, max_pen);
    $display("noise %0d crosstalk %0d enter %0d absorb %0d forward %0d drop %0d txcorr %0d",
             n_noise, n_xt, n_enter, n_absorb, n_fwd, n_drop, n_txcorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

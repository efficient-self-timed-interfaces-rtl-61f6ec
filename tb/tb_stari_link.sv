// tb_stari_link: end-to-end test of the single-stage STARI link at its
// default parameters.
//
// The transmitter sends an incrementing byte on every Phi_T edge that the
// link accepts (tx_ready); the receiver checks that every word it is handed
// (rx_valid) is the successor of the previous one, so any lost or duplicated
// word is an error, and measures the latency from the latch-T edge to the
// latch-R edge. Eight scenarios run one after another, each from reset:
//   1. same frequency, maximum-robustness start-up only
//   2. same frequency, minimum-latency start-up (one Phi_T event suppressed)
//   2b. the same with too little margin for transmitter-last: a near-miss
//      makes the receiver skip one event and the link falls back
//   3. rational ratio 3/5 (Phi_T 1000 ps, Phi_R 600 ps)
//   4. plesiochronous, transmitter 1% fast: stuff cycles
//   5. plesiochronous, receiver 1% fast: receiver skips
//   6. arbitrary ratio, receiver faster (Phi_T 2730 ps, Phi_R 1000 ps):
//      measured ratio, near-miss corrections in the receiver
//   7. arbitrary ratio, transmitter faster (Phi_T 1000 ps, Phi_R 2730 ps):
//      the transmitter measures and rate-multiplies, corrections there
// Checks after start-up: no lost or duplicated word (scenarios 1-5),
// latency below two receiver periods (1, 4, 5) and below one period
// with minimum-latency start-up (2), delivered rate NT/NR (3), and, for the
// arbitrary ratio, a measured ratio within one count of the true one, a
// delivered rate within 1% of the transmitter's and fewer than 1% words
// lost or repeated at corrections. Every mechanism (both controller modes,
// suppressed edge, miss-driven sequence shift, both slips, ratio measurement,
// drift correction, receive FIFO bypass and holding) must occur at least
// once. The receiver also pulls every word through the receive FIFO
// (rx_avail/rx_take), in 90% of the cycles in scenario 3 and whenever one
// is offered otherwise. The pulled words must run in sequence there
// (scenario 3) and keep up with the arriving ones everywhere, and the FIFO
// must never overflow.
`timescale 1ps/1ps
module tb_stari_link;
  import stari_pkg::*;

  localparam int unsigned WIDTH = 8;
  localparam int RX_DEPTH = 4;   // default receive FIFO depth

  int checks   = 0;
  int failures = 0;

  logic             phi_t = 1'b0, phi_r = 1'b0;
  logic             rst_t_n = 1'b0, rst_r_n = 1'b0;
  logic [WIDTH-1:0] tx_data = '0;
  logic             tx_ready, init_done, slip_t, miss_t, correction_t;
  logic [WIDTH-1:0] rx_data;
  logic             rx_valid, miss, slip_r, correction, est_valid, t_last;
  logic             rx_avail, rx_overflow;
  logic [WIDTH-1:0] rx_word;
  logic             rx_take = 1'b0;
  link_mode_e       mode = MODE_MESO;
  logic             min_latency = 1'b0;

  stari_link dut (
    .phi_t(phi_t), .rst_t_n(rst_t_n), .tx_data(tx_data), .tx_ready(tx_ready),
    .init_done(init_done), .slip_t(slip_t), .miss_t(miss_t), .correction_t(correction_t),
    .phi_r(phi_r), .rst_r_n(rst_r_n), .rx_data(rx_data), .rx_valid(rx_valid),
    .rx_avail(rx_avail), .rx_word(rx_word), .rx_take(rx_take), .rx_overflow(rx_overflow),
    .miss(miss), .slip_r(slip_r), .correction(correction), .est_valid(est_valid),
    .mode(mode), .min_latency(min_latency), .t_last(t_last)
  );

  // ---------------- clocks ----------------
  int  pt = 1000, pr = 1000, ph_t = 0, ph_r = 0;
  bit  run = 1'b0;
  int  clocks_running = 0;

  task automatic clock_t_loop();
    clocks_running++;
    #(ph_t);
    while (run) begin
      phi_t = 1'b1; #(pt / 2);
      phi_t = 1'b0; #(pt - pt / 2);
    end
    clocks_running--;
  endtask

  task automatic clock_r_loop();
    clocks_running++;
    #(ph_r);
    while (run) begin
      phi_r = 1'b1; #(pr / 2);
      phi_r = 1'b0; #(pr - pr / 2);
    end
    clocks_running--;
  endtask

  // ---------------- transmitter ----------------
  logic   rdy_s = 1'b0;
  logic   took  = 1'b0;
  longint t_sent [256];
  int     tx_words = 0;

  always @(posedge phi_t) begin
    took = rdy_s;
    if (rdy_s) begin
      t_sent[tx_data] = $time;
      tx_words++;
    end
  end

  always @(negedge phi_t) begin
    if (took) tx_data = tx_data + 1'b1;
    took  = 1'b0;
    rdy_s = tx_ready;
  end

  // ---------------- receiver ----------------
  bit     checking = 1'b0;
  bit     have_last = 1'b0;
  logic [WIDTH-1:0] last_word;
  int     rx_words = 0, rx_errors = 0, rx_cycles = 0;
  longint lat_max = 0;
  longint t_redge;
  int     n_tlast = 0, n_rlast = 0;

  always @(posedge phi_r) t_redge = $time;

  always @(negedge phi_r) begin
    if (checking) begin
      rx_cycles++;
      if (t_last) n_tlast++; else n_rlast++;
      if (rx_valid) begin
        rx_words++;
        if (have_last && rx_data != last_word + 1'b1) rx_errors++;
        if (t_redge - t_sent[rx_data] > lat_max) lat_max = t_redge - t_sent[rx_data];
        last_word = rx_data;
        have_last = 1'b1;
      end
    end
  end

  // ---------------- receiver pulling through the FIFO ----------------
  // Takes an offered word in take_pct percent of the cycles and checks
  // that the pulled words also run in sequence.
  int     take_pct = 100;
  bit     fifo_have_last = 1'b0;
  logic [WIDTH-1:0] fifo_last;
  int     fifo_words = 0, fifo_errors = 0, n_fifo_bypass = 0, n_fifo_held = 0;

  always @(negedge phi_r) begin
    if (checking && dut.rx_fifo_level > 0) n_fifo_held++;
    // decide now, take at the next rising edge: the word is the one offered now
    rx_take = rx_avail && ($urandom_range(0, 99) < take_pct);
    if (checking && rx_valid && dut.rx_fifo_level == 0 && rx_take) n_fifo_bypass++;
    if (rx_take) begin
      if (checking) begin
        fifo_words++;
        if (fifo_have_last && rx_word != fifo_last + 1'b1) fifo_errors++;
      end
      fifo_last      = rx_word;
      fifo_have_last = checking;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_miss = 0, n_slip_t = 0, n_slip_r = 0, n_corr = 0, n_corr_t = 0, n_suppress = 0;
  int seen_tlast = 0, seen_rlast = 0;
  always @(posedge phi_r) begin
    if (miss)       n_miss++;
    if (slip_r)     n_slip_r++;
    if (correction) n_corr++;
  end
  always @(posedge phi_t) begin
    if (slip_t) n_slip_t++;
    if (correction_t) n_corr_t++;
    // tx_ready low without a stuff cycle or a rate multiplier at work
    if (!tx_ready && !slip_t && rst_t_n && (mode == MODE_MESO || mode == MODE_PLESIO)) n_suppress++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one scenario: reset, start clocks, wait for start-up, then observe.
  task automatic scenario(input string name, input link_mode_e m, input bit minlat,
                          input int t_per, input int r_per, input int t_ph, input int r_ph,
                          input int observe_cycles);
    mode = m; min_latency = minlat;
    pt = t_per; pr = r_per; ph_t = t_ph; ph_r = r_ph;
    rst_t_n = 1'b0; rst_r_n = 1'b0;
    checking = 1'b0; have_last = 1'b0;
    rx_words = 0; rx_errors = 0; rx_cycles = 0; lat_max = 0; tx_words = 0;
    fifo_words = 0; fifo_errors = 0; fifo_have_last = 1'b0;
    n_tlast = 0; n_rlast = 0;
    run = 1'b1;
    fork
      clock_t_loop();
      clock_r_loop();
    join_none
    #(10 * pr);
    rst_t_n = 1'b1; rst_r_n = 1'b1;
    wait (init_done);
    if (m == MODE_ARBITRARY) wait (est_valid);
    #(200 * pr);
    checking = 1'b1;
    tx_words = 0;
    #(observe_cycles * pr);
    checking = 1'b0;
    if (n_tlast > 0) seen_tlast++;
    if (n_rlast > 0) seen_rlast++;
    $display("%s: rx_words=%0d tx_words=%0d errors=%0d lat_max=%0d t_last_cycles=%0d r_last_cycles=%0d fifo_words=%0d fifo_errors=%0d",
             name, rx_words, tx_words, rx_errors, lat_max, n_tlast, n_rlast, fifo_words, fifo_errors);
    check(!rx_overflow, {name, ": receive FIFO overflow"});
    check(fifo_words >= rx_words - 1 - RX_DEPTH && fifo_words <= rx_words + RX_DEPTH,
          {name, ": pulled words keep up with arriving words"});
    run = 1'b0;
    wait (clocks_running == 0);
    #1000;
  endtask

  initial begin
    int n_miss0, n_sup0, n_st0, n_sr0, n_c0;

    // 1. same frequency, transmitter 300 ps after receiver: ramp picks the
    //    mode with the larger margin.
    scenario("meso", MODE_MESO, 1'b0, 1000, 1000, 700, 0, 2000);
    check(rx_errors == 0, "meso: lost or repeated word");
    check(rx_words >= 1990, "meso: one word per cycle");
    check(lat_max < 2 * 1000, "meso: latency below 2P");

    // 2. same frequency, receiver 400 ps after transmitter, minimum latency.
    n_sup0 = n_suppress;
    scenario("meso-minlat", MODE_MESO, 1'b1, 1000, 1000, 0, 400, 2000);
    check(rx_errors == 0, "minlat: lost or repeated word");
    check(n_tlast == rx_cycles && rx_cycles > 0, "minlat: transmitter-last after start-up");
    check(lat_max < 1000, "minlat: latency below P");
    check(n_suppress - n_sup0 == 1, "minlat: exactly one Phi_T event suppressed");

    // 2b. same frequency, receiver only 300 ps after transmitter: the forced
    //     transmitter-last operation is inside the near-miss margin, so one
    //     skipped Phi_R event must return the link to receiver-last.
    n_sr0 = n_slip_r;
    scenario("meso-minlat-near", MODE_MESO, 1'b1, 1000, 1000, 0, 300, 2000);
    check(rx_errors == 0, "minlat-near: lost or repeated word");
    check(n_slip_r - n_sr0 >= 1, "minlat-near: receiver skip after a near-miss");
    check(n_rlast == rx_cycles && rx_cycles > 0, "minlat-near: back in receiver-last");
    check(lat_max < 2 * 1000, "minlat-near: latency below 2P");

    // 3. rational 3/5; the receiver pulls words in only 90% of the cycles,
    //    so the FIFO has to hold some.
    n_miss0 = n_miss;
    take_pct = 90;
    scenario("rational", MODE_RATIONAL, 1'b0, 1000, 600, 0, 130, 3000);
    take_pct = 100;
    check(fifo_errors == 0, "rational: words pulled from the FIFO out of sequence");
    check(rx_errors == 0, "rational: lost or repeated word");
    check(rx_words * 5 >= rx_cycles * 3 - 5 && rx_words * 5 <= rx_cycles * 3 + 5,
          "rational: 3 words per 5 receiver cycles");
    check(n_miss > n_miss0, "rational: misses shifted the sum sequence at start-up");

    // 4. plesiochronous, transmitter fast.
    n_st0 = n_slip_t;
    scenario("plesio-tfast", MODE_PLESIO, 1'b0, 990, 1000, 0, 500, 3000);
    check(rx_errors == 0, "plesio-tfast: lost or repeated word");
    check(n_slip_t - n_st0 >= 20, "plesio-tfast: stuff cycles");
    check(lat_max < 2 * 1000, "plesio-tfast: latency below 2P");

    // 5. plesiochronous, receiver fast.
    n_sr0 = n_slip_r;
    scenario("plesio-rfast", MODE_PLESIO, 1'b0, 1000, 990, 0, 500, 3000);
    check(rx_errors == 0, "plesio-rfast: lost or repeated word");
    check(n_slip_r - n_sr0 >= 20, "plesio-rfast: receiver skips");
    check(lat_max < 2 * 1000, "plesio-rfast: latency below 2P");

    // 6. arbitrary ratio.
    n_c0 = n_corr;
    scenario("arbitrary", MODE_ARBITRARY, 1'b0, 2730, 1000, 0, 300, 20000);
    // 1024 * 1000 / 2730 = 375.1
    check(dut.est_count >= 374 && dut.est_count <= 376, "arbitrary: ratio measured");
    check(n_corr > n_c0, "arbitrary: near-miss corrections");
    check(rx_words * 100 >= tx_words * 99 && rx_words * 100 <= tx_words * 101,
          "arbitrary: delivered rate follows the transmitter");
    check(rx_errors * 100 < rx_words, "arbitrary: under 1% of words lost or repeated");

    // 7. arbitrary ratio, transmitter faster.
    n_c0 = n_corr_t;
    scenario("arbitrary-tfast", MODE_ARBITRARY, 1'b0, 1000, 2730, 0, 300, 8000);
    // the transmitter counts 1024 * 1000 / 2730 = 375.1 receiver cycles
    check(dut.est_t_count >= 374 && dut.est_t_count <= 376, "arbitrary-tfast: ratio measured");
    check(n_corr_t > n_c0, "arbitrary-tfast: near-miss corrections in the transmitter");
    check(rx_words * 100 >= rx_cycles * 99, "arbitrary-tfast: a word in every receiver cycle");
    check(rx_words * 100 >= tx_words * 99 && rx_words * 100 <= tx_words * 101,
          "arbitrary-tfast: delivered rate follows the transmitter");
    check(rx_errors * 100 < rx_words, "arbitrary-tfast: under 1% of words lost or repeated");
    check(lat_max < 2 * 2730, "arbitrary-tfast: latency below two receiver periods");

    // mechanisms seen at least once
    check(n_fifo_bypass > 0, "receive FIFO bypass never used");
    check(n_fifo_held > 0, "receive FIFO never held a word");
    check(seen_tlast > 0, "transmitter-last mode never seen");
    check(seen_rlast > 0, "receiver-last mode never seen");
    $display("mechanisms: miss=%0d slip_t=%0d slip_r=%0d correction=%0d correction_t=%0d suppressed=%0d tlast_scen=%0d rlast_scen=%0d",
             n_miss, n_slip_t, n_slip_r, n_corr, n_corr_t, n_suppress, seen_tlast, seen_rlast);
    $display("receive FIFO: bypass=%0d held_cycles=%0d", n_fifo_bypass, n_fifo_held);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(200_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

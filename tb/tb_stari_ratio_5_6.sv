// tb_stari_ratio_5_6: the link with rationally related clocks at the ratio
// of the worked example of the design, P_R = 1 ns and P_T = 1.2 ns
// (N_T/N_R = 5/6), and a controller self-reset time of 450 ps.
//
// The bound that holds for every pulse sequence of the rate multiplier,
// P_T - (1 - 1/N_T) P_R > 2 eta, gives eta < 0.2 ns here; with the best
// sequence the bound is P_T - P_R/2 > eta, eta < 0.7 ns. At 450 ps only the
// better sequences work, so the start-up ramp must use the miss-driven
// sequence shift to reach one (with the shift disabled, two of the six
// phase offsets below lose every sixth word). The test runs the link from
// reset at several phase offsets and checks, after start-up, that every
// word arrives once and in order, that five words arrive per six receiver
// cycles and that no miss is reported once the link has started.
`timescale 1ps/1ps
module tb_stari_ratio_5_6;
  import stari_pkg::*;

  localparam int unsigned WIDTH = 8;
  localparam int PT = 1200, PR = 1000;

  int checks = 0, failures = 0;

  logic             phi_t = 1'b0, phi_r = 1'b0;
  logic             rst_t_n = 1'b0, rst_r_n = 1'b0;
  logic [WIDTH-1:0] tx_data = '0;
  logic             tx_ready, init_done, slip_t, miss_t, correction_t;
  logic [WIDTH-1:0] rx_data;
  logic             rx_valid, miss, slip_r, correction, est_valid, t_last;
  logic             rx_avail, rx_overflow;
  logic [WIDTH-1:0] rx_word;

  stari_link #(.NT(5), .NR(6), .ETA_PS(450)) dut (
    .phi_t(phi_t), .rst_t_n(rst_t_n), .tx_data(tx_data), .tx_ready(tx_ready),
    .init_done(init_done), .slip_t(slip_t), .miss_t(miss_t), .correction_t(correction_t),
    .phi_r(phi_r), .rst_r_n(rst_r_n), .rx_data(rx_data), .rx_valid(rx_valid),
    .rx_avail(rx_avail), .rx_word(rx_word), .rx_take(rx_avail), .rx_overflow(rx_overflow),
    .miss(miss), .slip_r(slip_r), .correction(correction), .est_valid(est_valid),
    .mode(MODE_RATIONAL), .min_latency(1'b0), .t_last(t_last)
  );

  int  ph_r = 0;
  bit  run = 1'b0;
  int  clocks_running = 0;

  task automatic clock_t_loop();
    clocks_running++;
    while (run) begin phi_t = 1'b1; #(PT / 2); phi_t = 1'b0; #(PT / 2); end
    clocks_running--;
  endtask

  task automatic clock_r_loop();
    clocks_running++;
    #(ph_r);
    while (run) begin phi_r = 1'b1; #(PR / 2); phi_r = 1'b0; #(PR / 2); end
    clocks_running--;
  endtask

  // transmitter: next word after each accepted edge
  logic rdy_s = 1'b0, took = 1'b0;
  always @(posedge phi_t) took = rdy_s;
  always @(negedge phi_t) begin
    if (took) tx_data = tx_data + 1'b1;
    took  = 1'b0;
    rdy_s = tx_ready;
  end

  // receiver
  bit checking = 1'b0, have_last = 1'b0;
  logic [WIDTH-1:0] last_word;
  int rx_words, rx_errors, rx_cycles, late_miss, total_miss = 0;
  always @(negedge phi_r) begin
    if (miss) total_miss++;
    if (checking) begin
      rx_cycles++;
      if (miss) late_miss++;
      if (rx_valid) begin
        rx_words++;
        if (have_last && rx_data != last_word + 1'b1) rx_errors++;
        last_word = rx_data;
        have_last = 1'b1;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) begin
      ph_r = 73 + 191 * i;
      rst_t_n = 1'b0; rst_r_n = 1'b0;
      checking = 1'b0; have_last = 1'b0;
      rx_words = 0; rx_errors = 0; rx_cycles = 0; late_miss = 0;
      run = 1'b1;
      fork clock_t_loop(); clock_r_loop(); join_none
      #(10 * PR);
      rst_t_n = 1'b1; rst_r_n = 1'b1;
      wait (init_done);
      #(200 * PR);
      checking = 1'b1;
      #(3000 * PR);
      checking = 1'b0;
      $display("phase %0d: rx_words=%0d cycles=%0d errors=%0d misses_after_start=%0d",
               ph_r, rx_words, rx_cycles, rx_errors, late_miss);
      check(rx_errors == 0, $sformatf("phase %0d: lost or repeated word", ph_r));
      check(rx_words * 6 >= rx_cycles * 5 - 6 && rx_words * 6 <= rx_cycles * 5 + 6,
            $sformatf("phase %0d: 5 words per 6 receiver cycles", ph_r));
      check(late_miss == 0, $sformatf("phase %0d: no miss after start-up", ph_r));
      run = 1'b0;
      wait (clocks_running == 0);
      #1000;
    end
    check(total_miss > 0, "sequence search: misses seen during start-up");
    $display("misses during start-up: %0d", total_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

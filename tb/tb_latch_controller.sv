// tb_latch_controller: checks the edge-pairing behaviour of the latch
// controller model with hand-placed edges (expected Phi_X times worked out
// from the input delays and the self-reset time), then runs two equal
// clocks at many phase offsets and checks one Phi_X pulse per cycle and the
// operating mode the controller settles in, including the fall-back to
// transmitter-last when receiver-last leaves too little time to self-reset.
`timescale 1ps/1ps
module tb_latch_controller;
  localparam int unsigned DT = 60, DR = 40, ETA = 250, STEP = 25;
  int checks = 0, failures = 0;
  logic phi_t = 1'b0, phi_r = 1'b0;
  logic [5:0] code = '0;
  logic phi_x, phi_tp, phi_rp, t_last;
  int unsigned lost_t, lost_r;

  latch_controller #(.DELAY_T_PS(DT), .DELAY_R_PS(DR), .ETA_PS(ETA), .STEP_PS(STEP)) dut (
    .phi_t(phi_t), .phi_r(phi_r), .delay_code(code), .phi_x(phi_x),
    .phi_tp(phi_tp), .phi_rp(phi_rp), .t_last(t_last), .lost_t(lost_t), .lost_r(lost_r));

  longint x_rise[$];
  longint x_fall[$];
  always @(posedge phi_x) x_rise.push_back($time);
  always @(negedge phi_x) x_fall.push_back($time);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic edge_t(input longint at);
    #(at - $time) phi_t = 1'b1; #100 phi_t = 1'b0;
  endtask
  task automatic edge_r(input longint at);
    #(at - $time) phi_r = 1'b1; #100 phi_r = 1'b0;
  endtask

  int n0;
  initial begin
    // receiver last: X follows R' by nothing more
    n0 = x_rise.size();
    edge_t(1000); edge_r(1300); #1000;
    check(x_rise.size() == n0 + 1 && x_rise[n0] == 1300 + DR, "R last: Phi_X at R+delta_R");
    check(x_fall[n0] == 1300 + DR + ETA, "pulse width eta");
    check(!t_last, "R last reported");
    // transmitter last
    n0 = x_rise.size();
    edge_r(3000); edge_t(3200); #1000;
    check(x_rise.size() == n0 + 1 && x_rise[n0] == 3200 + DT, "T last: Phi_X at T+delta_T");
    check(t_last, "T last reported");
    // a second transmitter edge before the receiver edge is absorbed
    n0 = x_rise.size();
    edge_t(5000); edge_t(5200); edge_r(5500); #1000;
    check(x_rise.size() == n0 + 1 && x_rise[n0] == 5500 + DR, "double T: one Phi_X");
    // coincident edges: the later delayed input wins
    n0 = x_rise.size();
    fork edge_t(7000); edge_r(7000); join
    #1000;
    check(x_rise.size() == n0 + 1 && x_rise[n0] == 7000 + DT, "coincident edges");
    // an edge during the self-reset is lost
    n0 = x_rise.size();
    fork edge_t(9000); edge_r(9000); join
    edge_r(9200);                      // R' at 9240, Phi_X high 9060..9310
    check(lost_r == 1, "edge during self-reset lost");
    edge_t(9400); edge_r(9600); #1000;
    check(x_rise.size() == n0 + 2 && x_rise[n0 + 1] == 9600 + DR, "lost edge not counted");
    // longer self-reset through the delay code
    code = 6'd4;
    n0 = x_rise.size();
    edge_t(12000); edge_r(12100); #1000;
    check(x_fall[n0] - x_rise[n0] == ETA + 4 * STEP, "delay code lengthens self-reset");
    code = '0;

    // equal clocks, transmitter leads receiver by d
    for (int d = 100; d <= 900; d += 100) begin
      longint base;
      int lt0, lr0;
      base = 100_000 * (d / 100 + 1);
      lt0 = lost_t; lr0 = lost_r;
      #(base - $time);
      n0 = x_rise.size();
      fork
        for (int k = 0; k < 50; k++) edge_t(base + 1000 * k);
        for (int k = 0; k < 50; k++) edge_r(base + 1000 * k + d);
      join
      #2000;
      // Receiver-last needs the next T' to come eta after R':
      // (1000 + DT) - (d + DR) > ETA. Otherwise the controller loses one
      // transmitter edge and settles in transmitter-last operation.
      if (1000 + DT - (d + DR) > ETA) begin
        check(x_rise.size() == n0 + 50, $sformatf("d=%0d: one Phi_X per cycle", d));
        check(lost_t == lt0 && lost_r == lr0, $sformatf("d=%0d: no lost edge", d));
        check(x_rise[n0 + 49] == base + 49000 + d + DR, $sformatf("d=%0d: Phi_X after R'", d));
        check(!t_last, $sformatf("d=%0d: receiver last", d));
      end else begin
        // (a receiver edge left armed by the previous run may pair with
        // the first transmitter edge, in which case nothing is lost)
        check(x_rise.size() - n0 inside {49, 50}, $sformatf("d=%0d: at most one Phi_X lost", d));
        check(lost_t - lt0 <= 1 && lost_r == lr0, $sformatf("d=%0d: at most one lost edge", d));
        check(x_rise[x_rise.size() - 1] == base + 49000 + DT, $sformatf("d=%0d: Phi_X after T'", d));
        check(t_last, $sformatf("d=%0d: transmitter last", d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

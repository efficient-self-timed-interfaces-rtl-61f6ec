// tb_miss_detector_cell: places Phi_T'/Phi_U' edges inside, just after and
// well after a Phi_X pulse and checks which flags are raised, that ack
// clears a flag and that events are ignored while ack is high.
`timescale 1ps/1ps
module tb_miss_detector_cell;
  localparam int unsigned NEAR = 100;
  int checks = 0, failures = 0;
  logic phi_tp = 1'b0, phi_up = 1'b0, phi_x = 1'b0;
  logic ack_m = 1'b0, ack_t = 1'b0, ack_u = 1'b0;
  logic y_miss, y_near_t, y_near_u;

  miss_detector_cell #(.NEAR_PS(NEAR)) dut (
    .phi_tp(phi_tp), .phi_up(phi_up), .phi_x(phi_x),
    .ack_miss(ack_m), .ack_near_t(ack_t), .ack_near_u(ack_u),
    .y_miss(y_miss), .y_near_t(y_near_t), .y_near_u(y_near_u));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clear_all();
    ack_m = 1'b1; ack_t = 1'b1; ack_u = 1'b1;
    #10;
    ack_m = 1'b0; ack_t = 1'b0; ack_u = 1'b0;
    #10;
  endtask

  task automatic x_pulse_with(input int t_at, input int u_at);
    // Phi_X high from 0 to 250 relative to the start of the task.
    fork
      begin phi_x = 1'b1; #250 phi_x = 1'b0; end
      if (t_at >= 0) begin #(t_at) phi_tp = 1'b1; #20 phi_tp = 1'b0; end
      if (u_at >= 0) begin #(u_at) phi_up = 1'b1; #20 phi_up = 1'b0; end
    join
    #500;
  endtask

  initial begin
    #1000;
    x_pulse_with(-1, -1);
    check(!y_miss && !y_near_t && !y_near_u, "no edges, no flags");
    x_pulse_with(100, -1);
    check(y_miss && y_near_t && !y_near_u, "T' during Phi_X: miss and near-miss T");
    clear_all();
    check(!y_miss && !y_near_t && !y_near_u, "ack clears");
    x_pulse_with(-1, 200);
    check(y_miss && !y_near_t && y_near_u, "U' during Phi_X: miss and near-miss U");
    clear_all();
    x_pulse_with(-1, 250 + NEAR / 2);
    check(!y_miss && !y_near_t && y_near_u, "U' just after Phi_X: near-miss only");
    clear_all();
    x_pulse_with(250 + NEAR / 2, -1);
    check(!y_miss && y_near_t && !y_near_u, "T' just after Phi_X: near-miss only");
    clear_all();
    x_pulse_with(250 + 2 * NEAR, 250 + 3 * NEAR);
    check(!y_miss && !y_near_t && !y_near_u, "edges well after Phi_X: nothing");
    ack_m = 1'b1; ack_t = 1'b1; ack_u = 1'b1;
    x_pulse_with(50, 60);
    check(!y_miss && !y_near_t && !y_near_u, "ack high: events ignored");
    ack_m = 1'b0; ack_t = 1'b0; ack_u = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_drift_tracker: checks the load of the measured ratio with its fraction
// bits, the sign and size of each first-order correction, and that the
// estimate moves one step only for a repeated report of the same kind that
// arrives within LONG_INTERVAL cycles.
`timescale 1ps/1ps
module tb_drift_tracker;
  localparam int unsigned W = 16, LONG = 50, FRAC = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, near_u = 1'b0, near_t = 1'b0;
  logic [W-1:0] load_n_t = 16'd375, n_r = 16'd1024;
  logic [W-1:0] n_t;
  logic offset_valid;
  logic signed [W+1:0] offset;
  logic [19:0] last_interval;
  logic [15:0] updates;

  drift_tracker #(.W(W), .INTERVAL_W(20), .LONG_INTERVAL(LONG), .FRAC_BITS(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .load_n_t(load_n_t), .n_r(n_r),
    .near_u(near_u), .near_t(near_t), .n_t(n_t),
    .offset_valid(offset_valid), .offset(offset), .last_interval(last_interval),
    .updates(updates));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One report; checks the correction that follows and the new n_t.
  task automatic report(input bit u, input bit t, input int gap,
                        input int exp_n_t, input int exp_off, input string what);
    repeat (gap) begin
      @(negedge clk);
      check(!offset_valid, {what, ": no correction between reports"});
    end
    near_u = u; near_t = t;
    @(negedge clk);
    near_u = 1'b0; near_t = 1'b0;
    if (u ^ t) begin
      check(offset_valid, {what, ": correction pulse"});
      check(offset == (W+2)'(exp_off), $sformatf("%s: offset %0d", what, offset));
    end else begin
      check(!offset_valid, {what, ": no correction"});
    end
    check(n_t == W'(exp_n_t), $sformatf("%s: n_t %0d expected %0d", what, n_t, exp_n_t));
  endtask

  initial begin
    #1700 rst_n = 1'b1;
    @(negedge clk); load = 1'b1;
    @(negedge clk); load = 1'b0;
    check(n_t == 375 * 16, "ratio loaded with fraction bits");
    report(1, 0, 5,  6000, -8192, "first Phi_U report");
    report(1, 0, 5,  5999, -8192, "repeated Phi_U report");
    report(1, 0, 10, 5998, -8192, "third Phi_U report");
    report(0, 1, 5,  5998,  8192, "first Phi_T report");
    report(0, 1, 5,  5999,  8192, "repeated Phi_T report");
    report(0, 1, 70, 5999,  8192, "Phi_T report after a long interval");
    report(1, 1, 5,  5999,  0,    "simultaneous reports");
    check(updates == 3, $sformatf("three estimate updates (%0d)", updates));
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

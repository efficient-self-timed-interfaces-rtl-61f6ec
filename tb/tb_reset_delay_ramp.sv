// tb_reset_delay_ramp: checks the delay code starts at its maximum, falls by
// one every STEP_CYCLES cycles and ends at zero with done.
`timescale 1ps/1ps
module tb_reset_delay_ramp;
  localparam int unsigned CODE_W = 4, STEP = 5;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CODE_W-1:0] code;
  logic done;

  reset_delay_ramp #(.CODE_W(CODE_W), .STEP_CYCLES(STEP)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .code(code), .done(done));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc;
  initial begin
    #1700 rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check(code == '1 && !done, "holds maximum before start");
    start = 1'b1;
    cyc = 0;
    // Code k (counting down from 15) lasts STEP cycles after start.
    for (int k = 2**CODE_W - 1; k > 0; k--) begin
      for (int s = 0; s < STEP; s++) begin
        @(negedge clk); cyc++;
        check(code == CODE_W'(k) || (k == 2**CODE_W - 1 && s == 0),
              $sformatf("code %0d at cycle %0d (is %0d)", k, cyc, code));
        check(!done, "not done while ramping");
      end
    end
    repeat (2) @(negedge clk);
    check(code == '0 && done, "ends at zero with done");
    repeat (10) @(negedge clk);
    check(code == '0 && done, "stays done");
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

// tb_freq_estimator: measures a foreign clock slower and faster than the
// local one and checks the count against WINDOW * f_foreign / f_local,
// within one count either way plus one for the gate's synchronizer.
`timescale 1ps/1ps
module tb_freq_estimator;
  localparam int unsigned W = 16, WINDOW = 256;
  int checks = 0, failures = 0;
  logic clk = 1'b0, fclk = 1'b0, rst_n = 1'b0, frst_n = 1'b0, start = 1'b0;
  logic [W-1:0] count;
  logic valid;
  int fper = 1667;

  freq_estimator #(.W(W), .WINDOW(WINDOW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fclk(fclk), .frst_n(frst_n),
    .count(count), .valid(valid));

  always #500 clk = ~clk;
  initial forever begin #(fper / 2) fclk = 1'b1; #(fper - fper / 2) fclk = 1'b0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int per);
    real expected;
    int  cyc;
    fper = per;
    expected = real'(WINDOW) * 1000.0 / real'(per);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    check(!valid, "valid drops when a measurement starts");
    cyc = 0;
    while (!valid && cyc < 4 * WINDOW) begin @(negedge clk); cyc++; end
    check(valid, "result arrives");
    check(cyc >= WINDOW && cyc <= WINDOW + 12 + 4 * per / 1000, $sformatf("result after %0d cycles", cyc));
    check(real'(count) >= expected - 1.5 && real'(count) <= expected + 1.5,
          $sformatf("period %0d: count %0d, expected %f", per, count, expected));
  endtask

  initial begin
    #2300 rst_n = 1'b1; frst_n = 1'b1;
    measure(1667);
    measure(733);
    measure(2730);
    measure(1000);
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

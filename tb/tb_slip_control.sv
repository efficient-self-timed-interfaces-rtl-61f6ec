// tb_slip_control: checks that an accepted request removes exactly the clock
// edge two edges later, that requests in the hold-off time and requests
// while disabled are ignored.
`timescale 1ps/1ps
module tb_slip_control;
  localparam int unsigned HOLDOFF = 6;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, request = 1'b0;
  logic clk_en, slip, gclk;

  slip_control #(.HOLDOFF_CYCLES(HOLDOFF)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .request(request), .clk_en(clk_en), .slip(slip));
  clock_gate u_gate (.clk(clk), .en(clk_en), .gclk(gclk));

  always #500 clk = ~clk;

  int n = 0, gn = 0;
  always @(posedge clk) n++;
  always @(posedge gclk) gn++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_request();
    @(negedge clk); request = 1'b1;
    @(negedge clk); request = 1'b0;
  endtask

  int n0, g0;
  initial begin
    #1700 rst_n = 1'b1;
    // disabled: nothing happens
    pulse_request();
    repeat (10) @(negedge clk);
    check(n == gn, "disabled: no edge removed");
    enable = 1'b1;
    for (int i = 0; i < 20; i++) begin
      n0 = n; g0 = gn;
      pulse_request();              // request seen on edge n0+1
      check(n - gn == n0 - g0, "edge n0+1 still passed");
      @(negedge clk);               // edge n0+2 must be removed
      check(n - gn == n0 - g0 + 1, "edge two after request removed");
      // a second request inside the hold-off is ignored
      pulse_request();
      repeat (HOLDOFF + 4) @(negedge clk);
      check(n - gn == n0 - g0 + 1, "request in hold-off ignored");
      repeat ($urandom % 5) @(negedge clk);
    end
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

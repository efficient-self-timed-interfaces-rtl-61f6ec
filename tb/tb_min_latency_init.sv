// tb_min_latency_init: checks that exactly one clock event is removed, at
// the expected edge, and that done rises after the resolve wait.
`timescale 1ps/1ps
module tb_min_latency_init;
  localparam int unsigned SETTLE = 10, RESOLVE = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic t_en, done, gclk;

  min_latency_init #(.SETTLE_CYCLES(SETTLE), .RESOLVE_CYCLES(RESOLVE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .t_en(t_en), .done(done));
  clock_gate u_gate (.clk(clk), .en(t_en), .gclk(gclk));

  always #500 clk = ~clk;

  int clk_edges = 0, gclk_edges = 0, missing_at = -1, done_at = -1;
  always @(posedge clk) clk_edges++;
  always @(posedge gclk) gclk_edges++;
  always @(negedge clk) begin
    if (start && missing_at < 0 && clk_edges != gclk_edges) missing_at = clk_edges;
    if (done && done_at < 0) done_at = clk_edges;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1700 rst_n = 1'b1;
    #3000;
    check(gclk_edges == clk_edges, "no edge removed before start");
    check(!done, "not done before start");
    @(negedge clk);
    start = 1'b1;
    clk_edges = 0; gclk_edges = 0;
    repeat (SETTLE + RESOLVE + 20) @(negedge clk);
    // start is seen on edge 1; SETTLE cycles; SUPPRESS state after edge
    // SETTLE+1 removes edge SETTLE+2.
    check(missing_at == SETTLE + 2, $sformatf("edge removed at %0d", missing_at));
    check(clk_edges - gclk_edges == 1, "exactly one edge removed");
    check(done_at == SETTLE + 2 + RESOLVE, $sformatf("done after edge %0d", done_at));
    check(done && t_en, "done holds, no further suppression");
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

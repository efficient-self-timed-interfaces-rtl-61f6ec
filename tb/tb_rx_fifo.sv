// tb_rx_fifo: checks the receiver-side FIFO against a queue model.
//
// Words arrive at random (in_valid about half the cycles, as from a rate
// multiplier) and the receiver takes at random whenever a word is offered.
// Every cycle the offered word and out_avail are compared with the model.
// The model offers the oldest stored word, or the arriving word when
// nothing is stored (bypass, same cycle). Also checked are the stored
// level, that a taken word leaves and that arrivals are kept in order.
// A final phase stops taking until the FIFO is full and checks that one
// more arrival sets overflow. Bypass, storing and full are each required
// to happen.
`timescale 1ps/1ps
module tb_rx_fifo;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 4;

  int checks = 0, failures = 0;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             in_valid = 1'b0, take = 1'b0;
  logic [WIDTH-1:0] in_data = '0;
  logic             out_avail, overflow;
  logic [WIDTH-1:0] out_data;
  logic [2:0]       level;

  rx_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_avail(out_avail), .out_data(out_data), .take(take),
    .overflow(overflow), .level(level)
  );

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic [WIDTH-1:0] q[$];
  bit   exp_ovf = 1'b0;
  int   n_bypass = 0, n_stored = 0, n_full = 0;

  // compare the offered word, then advance the model as the edge does
  task automatic step();
    bit popping, pushing;
    #1;
    check(out_avail == (q.size() > 0 || in_valid), "out_avail");
    if (out_avail) begin
      if (q.size() > 0) check(out_data == q[0], $sformatf("stored word %0d, got %0d", q[0], out_data));
      else              check(out_data == in_data, "bypassed word");
    end
    check(level == q.size(), "level");
    check(overflow == exp_ovf, "overflow flag");
    if (q.size() == 0 && in_valid && take) n_bypass++;
    if (q.size() == DEPTH) n_full++;
    popping = take && q.size() > 0;
    pushing = in_valid && !(q.size() == 0 && take) && (q.size() < DEPTH || popping);
    if (in_valid && q.size() == DEPTH && !popping) exp_ovf = 1'b1;
    if (popping) void'(q.pop_front());
    if (pushing) begin q.push_back(in_data); n_stored++; end
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // random traffic, receiver keeps up on average
    for (int i = 0; i < 4000; i++) begin
      in_valid = ($urandom_range(0, 99) < 50);
      in_data  = in_data + 1'b1;
      #1;
      take = out_avail && ($urandom_range(0, 99) < 70);
      step();
      @(negedge clk);
    end
    // stop taking: fill up, then overflow
    take = 1'b0;
    for (int i = 0; i < DEPTH + 2; i++) begin
      in_valid = 1'b1;
      in_data  = in_data + 1'b1;
      step();
      @(negedge clk);
    end
    in_valid = 1'b0;
    step();
    check(overflow, "overflow after a full FIFO received another word");
    check(n_bypass > 0, "bypass never used");
    check(n_stored > 0, "no word ever stored");
    check(n_full > 0, "FIFO never full");
    $display("bypass=%0d stored=%0d full_cycles=%0d", n_bypass, n_stored, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_miss_sync: drives the asynchronous flag the way the detector cell does
// (set at a random time, cleared once ack is seen) and checks one miss pulse
// per event, its latency of STAGES or STAGES+1 edges and the ack level.
`timescale 1ps/1ps
module tb_miss_sync;
  localparam int unsigned STAGES = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, y = 1'b0;
  logic ack, miss;

  miss_sync #(.STAGES(STAGES)) dut (.clk(clk), .rst_n(rst_n), .y_async(y), .ack(ack), .miss(miss));

  always #500 clk = ~clk;

  // The flag's owner: clears y while ack is high.
  always @(posedge ack) y = 1'b0;

  int edges_since_set;
  int pulses;
  bit armed;

  always @(posedge clk) begin
    if (armed) edges_since_set++;
    if (miss) begin
      pulses++;
      checks++;
      // miss is evaluated just before this edge: the STAGES-th or next edge.
      if (!(edges_since_set >= STAGES && edges_since_set <= STAGES + 1)) begin
        failures++;
        $display("FAIL: miss after %0d edges", edges_since_set);
      end
      armed = 1'b0;
    end
  end

  initial begin
    pulses = 0; armed = 1'b0;
    #2000 rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      #(1000 + $urandom % 1000);
      edges_since_set = 0; armed = 1'b1;
      y = 1'b1;
      wait (!y);
      wait (!ack);
      #(5000);
      checks++;
      if (pulses != i + 1) begin
        failures++;
        $display("FAIL: %0d pulses after %0d events", pulses, i + 1);
      end
    end
    checks++;
    if (ack !== 1'b0) begin failures++; $display("FAIL: ack stuck"); end
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

// tb_rate_multiplier: checks the rate multiplier against an independent
// model of its accumulator, its rate over whole periods, the 3/5 sequence
// (0, -2, 1, -1, 2, 0, ...) from reset, the sequence shift and the offset.
`timescale 1ps/1ps
module tb_rate_multiplier;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] n_t, n_r;
  logic shift = 1'b0, offset_valid = 1'b0;
  logic signed [W+1:0] offset = '0;
  logic pulse;
  logic signed [W+1:0] sum;

  rate_multiplier #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .n_t(n_t), .n_r(n_r), .shift(shift),
    .offset_valid(offset_valid), .offset(offset), .pulse(pulse), .sum(sum)
  );

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int model_sum;
  int pulses;
  int expected_fig [8] = '{0, -2, 1, -1, 2, 0, -2, 1};

  task automatic run_ratio(input int nt, input int nr, input int periods, input bit random_ctl);
    n_t = W'(nt); n_r = W'(nr);
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    model_sum = 0;
    for (int p = 0; p < periods; p++) begin
      pulses = 0;
      for (int c = 0; c < nr; c++) begin
        int extra;
        shift = 1'b0; offset_valid = 1'b0;
        if (random_ctl && ($urandom % 17 == 0)) shift = 1'b1;
        if (random_ctl && ($urandom % 23 == 0)) begin
          offset_valid = 1'b1;
          offset = (W+2)'(int'($urandom % 7) - 3);
        end
        #1;
        check(sum == (W+2)'(model_sum), "sum matches model");
        check(pulse == (model_sum >= 0), "pulse matches model");
        if (pulse) pulses++;
        extra = (shift ? 1 : 0) + (offset_valid ? int'(offset) : 0);
        model_sum = model_sum + ((model_sum >= 0) ? nt - nr : nt) + extra;
        @(negedge clk);
      end
      if (!random_ctl) check(pulses == nt, "N_T pulses per N_R cycles");
    end
    @(negedge clk); shift = 1'b0; offset_valid = 1'b0;
  endtask

  initial begin
    n_t = 3; n_r = 5;
    // Sequence from reset for the 3/5 example.
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      #1 check(sum == (W+2)'(expected_fig[i]), $sformatf("3/5 sum[%0d]", i));
      check(pulse == (expected_fig[i] >= 0), "3/5 pulse");
      @(negedge clk);
    end
    run_ratio(3, 5, 20, 1'b0);
    run_ratio(5, 6, 20, 1'b0);
    run_ratio(1, 1, 10, 1'b0);
    run_ratio(375, 1024, 3, 1'b0);
    run_ratio(3, 5, 40, 1'b1);
    run_ratio(7, 11, 40, 1'b1);
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

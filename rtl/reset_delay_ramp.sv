// reset_delay_ramp: maximum-robustness start-up of the link.
//
// The source design adds an adjustable delay to the self-reset cycle of the
// latch controller and lowers it gradually. While the delay is large neither
// operating mode is feasible; as it shrinks, the first mode to become
// feasible is the one with the larger skew margin, and the controller stays
// in it. With rational clocks the same slow ramp lets the miss detector walk
// the rate multiplier to its most robust pulse sequence. On silicon the delay
// is analog (the source modulates a ground potential); here it is a digital
// code that a delay element, or the behavioural latch controller, turns into
// extra self-reset time. The linear ramp, its start value and step length are
// this implementation's choices.
//
// Interface: after start, code begins at START_CODE and drops by one every
// STEP_CYCLES rising edges of clk until it reaches zero; done is then high.
`timescale 1ps/1ps
module reset_delay_ramp #(
  parameter int unsigned CODE_W      = stari_pkg::DELAY_CODE_W,
  parameter int unsigned START_CODE  = 2**CODE_W - 1,
  parameter int unsigned STEP_CYCLES = 32
) (
  input  logic              clk,
  input  logic              rst_n,   // asynchronous, active low
  input  logic              start,
  output logic [CODE_W-1:0] code,    // extra self-reset delay, in steps
  output logic              done
);

  localparam int unsigned STEP_W = $clog2(STEP_CYCLES + 1);

  logic              running_q;
  logic [STEP_W-1:0] step_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code      <= CODE_W'(START_CODE);
      running_q <= 1'b0;
      step_q    <= '0;
      done      <= 1'b0;
    end else if (!running_q && !done) begin
      if (start) begin
        running_q <= 1'b1;
        step_q    <= '0;
      end
    end else if (running_q) begin
      if (code == '0) begin
        running_q <= 1'b0;
        done      <= 1'b1;
      end else if (step_q == STEP_W'(STEP_CYCLES - 1)) begin
        step_q <= '0;
        code   <= code - 1'b1;
      end else begin
        step_q <= step_q + 1'b1;
      end
    end
  end

endmodule

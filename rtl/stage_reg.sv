// stage_reg: one data stage of the link (latch-T, latch-X or latch-R).
//
// The link moves a word through three registers: latch-T in the transmitter,
// clocked by Phi_T; latch-X, the single FIFO stage, clocked by the pulse
// Phi_X from the latch controller; and latch-R in the receiver, clocked by
// Phi_R. Like the source design, all three are modelled as positive
// edge-triggered registers; other latching styles would work as well. There
// is no reset: words captured before initialization has finished are allowed
// to be wrong, as the source design permits.
//
// Interface: clk captures d into q on its rising edge. Timing: q changes
// right after the rising edge of clk.
`timescale 1ps/1ps
module stage_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule

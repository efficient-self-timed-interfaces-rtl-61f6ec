// slip_control: plesiochronous drift correction for one side of the link.
//
// With independent but closely matched clocks the phase between Phi_T and
// Phi_R creeps slowly. The miss detector reports when an edge of this side's
// clock reaches the latch controller less than a small margin after its
// self-reset has completed; thousands of cycles remain before a real error,
// so the report can be synchronized at leisure. This block then removes one
// event of this side's clock from the latch controller: on the transmitter
// side the transmitter skips sending a word and its clock for that cycle (a
// stuff cycle), on the receiver side the receiver skips clocking the
// controller and receives no word in that cycle. Either way the controller
// moves to the other operating mode, far from the margin. After a slip,
// further requests are ignored for HOLDOFF_CYCLES so a report that was already
// in the synchronizer cannot cause a second slip; the hold-off is this
// implementation's choice.
//
// Interface: request is the one-cycle pulse from miss_sync; clk_en is low for
// exactly one cycle, the cycle after an accepted request, and feeds
// clock_gate, so the rising edge two edges after the request is removed;
// slip pulses in that cycle.
`timescale 1ps/1ps
module slip_control #(
  parameter int unsigned HOLDOFF_CYCLES = 16
) (
  input  logic clk,
  input  logic rst_n,     // asynchronous, active low
  input  logic enable,    // correction active (plesiochronous mode)
  input  logic request,   // synchronized near-miss pulse
  output logic clk_en,    // low: skip the next clock event
  output logic slip       // one-cycle pulse per skipped event
);

  localparam int unsigned HOLD_W = $clog2(HOLDOFF_CYCLES + 1);

  logic              skip_q;
  logic [HOLD_W-1:0] hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip_q <= 1'b0;
      hold_q <= '0;
    end else begin
      skip_q <= 1'b0;
      if (hold_q != '0) begin
        hold_q <= hold_q - 1'b1;
      end else if (enable && request) begin
        skip_q <= 1'b1;
        hold_q <= HOLD_W'(HOLDOFF_CYCLES);
      end
    end
  end

  assign clk_en = ~skip_q;
  assign slip   = skip_q;

endmodule

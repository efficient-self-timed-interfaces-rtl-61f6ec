// miss_sync: brings the miss detector's asynchronous flag y into a clock
// domain and turns each new miss into a one-cycle pulse.
//
// A chain of STAGES flip-flops synchronizes y; one more flip-flop holds the
// previous synchronized value, and miss is high in the cycle where the
// synchronized value rises. Because misses matter only during
// initialization or as slow drift warnings, the chain may be long: it never
// lies on the data path. ack is the synchronized level and is returned to
// the detector cell, which clears y while ack is high, so each detected event
// yields exactly one pulse (a four-phase return handshake that is this
// implementation's choice; the source design shows only the synchronizer, the
// flip-flop and the miss output). The depth of 3 is also a choice.
//
// Timing: miss rises STAGES+0..1 rising edges of clk after y rises.
`timescale 1ps/1ps
module miss_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n,     // asynchronous, active low
  input  logic y_async,   // asynchronous miss flag from the detector cell
  output logic ack,       // synchronized level, clears the flag in the cell
  output logic miss       // one-cycle pulse per detected event
);

  logic [STAGES-1:0] sync_q;
  logic              last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '0;
      last_q <= 1'b0;
    end else begin
      sync_q <= {sync_q[STAGES-2:0], y_async};
      last_q <= sync_q[STAGES-1];
    end
  end

  assign ack  = sync_q[STAGES-1];
  assign miss = sync_q[STAGES-1] & ~last_q;

endmodule

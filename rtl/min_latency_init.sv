// min_latency_init: minimum-latency start-up of the link.
//
// When both of the latch controller's operating modes are feasible, the
// transmitter-last mode delivers each word one clock period sooner than the
// receiver-last mode. This sequencer forces transmitter-last mode the way
// the source design describes: let the link run at full speed until the
// controller has settled and any metastability has died out (SETTLE_CYCLES),
// then suppress exactly one transmitter clock event, then wait again
// (RESOLVE_CYCLES) for a possible fall-back into receiver-last mode to
// settle. A controller in transmitter-last mode stays there; one in
// receiver-last mode sees a single receiver event before the next
// transmitter event and switches. The wait lengths are not given by the
// source and are parameters here.
//
// Interface: start (level) begins the sequence; t_en low during one Phi_T
// cycle removes the following Phi_T rising edge through clock_gate (the
// transmitter must not present a new word on that edge); done rises when the
// sequence is over and stays high until reset. With start tied high after
// reset the edge removed is edge SETTLE_CYCLES+2.
`timescale 1ps/1ps
module min_latency_init #(
  parameter int unsigned SETTLE_CYCLES  = 64,
  parameter int unsigned RESOLVE_CYCLES = 64
) (
  input  logic clk,      // free-running Phi_T
  input  logic rst_n,    // asynchronous, active low
  input  logic start,
  output logic t_en,     // low: suppress the next Phi_T event
  output logic done
);

  typedef enum logic [2:0] {
    S_IDLE, S_SETTLE, S_SUPPRESS, S_RESOLVE, S_DONE
  } state_e;

  localparam int unsigned CNT_W =
    $clog2((SETTLE_CYCLES > RESOLVE_CYCLES ? SETTLE_CYCLES : RESOLVE_CYCLES) + 1);

  state_e             state_q;
  logic [CNT_W-1:0]   cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_SETTLE;
          cnt_q   <= '0;
        end
        S_SETTLE: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CNT_W'(SETTLE_CYCLES - 1)) state_q <= S_SUPPRESS;
        end
        S_SUPPRESS: begin
          state_q <= S_RESOLVE;
          cnt_q   <= '0;
        end
        S_RESOLVE: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CNT_W'(RESOLVE_CYCLES - 1)) state_q <= S_DONE;
        end
        S_DONE: state_q <= S_DONE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign t_en = (state_q != S_SUPPRESS);
  assign done = (state_q == S_DONE);

endmodule

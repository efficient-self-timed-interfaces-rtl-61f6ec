// freq_estimator: measures the frequency of a forwarded foreign clock
// against the local clock.
//
// With arbitrary clocks the two sides forward their clocks to each other and
// each counts the other's edges to estimate the frequency ratio. This block
// opens a gate for WINDOW local cycles; the gate is synchronized into the
// foreign clock domain, where a counter clocked by the foreign clock counts
// the foreign cycles during which the gate is seen open. The counter's
// busy level is synchronized back; once it has risen and fallen again the
// count is stable and is copied into the local domain. The result
// approximates WINDOW * f_foreign / f_local to within one count, so
// count/WINDOW is a rational estimate of the frequency ratio. As in the
// source design, the counter must run at the foreign clock rate. Counting a
// gated window with a returned busy level is this implementation's choice.
//
// Interface: a start pulse (or level) in the local domain begins a
// measurement when idle; valid rises with the result and stays high until
// the next start. Timing: the result arrives WINDOW local cycles plus a few
// synchronizer delays in each domain after start.
`timescale 1ps/1ps
module freq_estimator #(
  parameter int unsigned W      = stari_pkg::RATIO_W,
  parameter int unsigned WINDOW = 1024
) (
  input  logic         clk,      // local clock
  input  logic         rst_n,    // asynchronous, active low, local domain
  input  logic         start,
  input  logic         fclk,     // forwarded foreign clock
  input  logic         frst_n,   // asynchronous, active low, foreign domain
  output logic [W-1:0] count,    // foreign cycles per WINDOW local cycles
  output logic         valid
);

  localparam int unsigned WIN_W = $clog2(WINDOW + 1);

  typedef enum logic [1:0] {E_IDLE, E_GATE, E_WAIT_BUSY, E_WAIT_IDLE} est_state_e;

  // ---------------- local domain ----------------
  est_state_e       state_q;
  logic [WIN_W-1:0] win_q;
  logic             gate_q;
  logic [1:0]       busy_sync_q;

  // ---------------- foreign domain ----------------
  logic [1:0]       gate_sync_q;
  logic [W-1:0]     fcount_q;

  always_ff @(posedge fclk or negedge frst_n) begin
    if (!frst_n) begin
      gate_sync_q <= '0;
      fcount_q    <= '0;
    end else begin
      gate_sync_q <= {gate_sync_q[0], gate_q};
      if (gate_sync_q[0] && !gate_sync_q[1]) fcount_q <= W'(1);
      else if (gate_sync_q[0])               fcount_q <= fcount_q + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= E_IDLE;
      win_q       <= '0;
      gate_q      <= 1'b0;
      busy_sync_q <= '0;
      count       <= '0;
      valid       <= 1'b0;
    end else begin
      busy_sync_q <= {busy_sync_q[0], gate_sync_q[1]};
      unique case (state_q)
        E_IDLE: if (start) begin
          state_q <= E_GATE;
          gate_q  <= 1'b1;
          win_q   <= '0;
          valid   <= 1'b0;
        end
        E_GATE: begin
          win_q <= win_q + 1'b1;
          if (win_q == WIN_W'(WINDOW - 1)) begin
            gate_q  <= 1'b0;
            state_q <= E_WAIT_BUSY;
          end
        end
        E_WAIT_BUSY: if (busy_sync_q[1]) state_q <= E_WAIT_IDLE;
        E_WAIT_IDLE: if (!busy_sync_q[1]) begin
          count   <= fcount_q;
          valid   <= 1'b1;
          state_q <= E_IDLE;
        end
        default: state_q <= E_IDLE;
      endcase
    end
  end

endmodule

// latch_controller: behavioural model of the self-resetting, edge-triggered
// C-element that clocks latch-X, the single FIFO stage.
//
// This is a behavioural model, not synthesizable logic: the real block is a
// small transistor-level circuit whose function depends on its delays. It
// waits until it has seen a rising edge on both of its inputs, Phi_T from
// the transmitter and Phi_R (or the rate-multiplied Phi_U) from the
// receiver, in either order, and then emits one pulse on Phi_X. The pulse
// lasts for the self-reset time eta; a rising edge that arrives during it is
// lost (a "miss"), exactly the failure the miss detector reports. Because
// only the pairing of edges matters and not their order, no synchronization
// is needed: the controller settles into transmitter-last operation (Phi_X
// follows Phi_T) or receiver-last operation (Phi_X follows Phi_R).
//
// Each input passes through a delay first (DELAY_T_PS = delta_T,
// DELAY_R_PS = delta_R); these make Phi_X late enough after Phi_T for the
// set-up time of latch-X and late enough after Phi_R for the hold time of
// latch-R. The delayed inputs Phi_T' and Phi_R' are brought out for the miss
// detector. The self-reset time is ETA_PS plus delay_code * STEP_PS, the
// adjustable delay used by the maximum-robustness initialization. All
// delay values are this implementation's assumptions; the source design
// gives none.
//
// Outputs for observation: t_last is high when the last Phi_X pulse was
// triggered by Phi_T' (transmitter-last); lost_t / lost_r count lost edges.
`timescale 1ps/1ps
module latch_controller #(
  parameter int unsigned DELAY_T_PS = 60,
  parameter int unsigned DELAY_R_PS = 40,
  parameter int unsigned ETA_PS     = 250,
  parameter int unsigned STEP_PS    = 25,
  parameter int unsigned CODE_W     = stari_pkg::DELAY_CODE_W
) (
  input  logic              phi_t,       // transmitter clock (possibly gated)
  input  logic              phi_r,       // receiver clock or Phi_U
  input  logic [CODE_W-1:0] delay_code,  // extra self-reset delay, in steps
  output logic              phi_x,       // clock pulse for latch-X
  output logic              phi_tp,      // Phi_T' (delayed input)
  output logic              phi_rp,      // Phi_R' (delayed input)
  output logic              t_last,
  output int unsigned       lost_t,
  output int unsigned       lost_r
);

  logic        x_q;
  logic        tp_q;
  logic        rp_q;
  logic        tp_prev;
  logic        rp_prev;
  logic        arm_t;      // node a_T has been pulled low
  logic        arm_r;      // node a_R has been pulled low
  logic        last_q;
  int unsigned lost_t_q;
  int unsigned lost_r_q;

  initial begin
    x_q      = 1'b0;
    tp_q     = 1'b0;
    rp_q     = 1'b0;
    tp_prev  = 1'b0;
    rp_prev  = 1'b0;
    arm_t    = 1'b0;
    arm_r    = 1'b0;
    last_q   = 1'b0;
    lost_t_q = 0;
    lost_r_q = 0;
  end

  // Input delays delta_T and delta_R (transport delays).
  always @(phi_t) tp_q <= #(DELAY_T_PS) phi_t;
  always @(phi_r) rp_q <= #(DELAY_R_PS) phi_r;

  // Edge capture and firing.
  always @(tp_q or rp_q) begin
    logic t_edge, r_edge;
    t_edge  = tp_q && !tp_prev;
    r_edge  = rp_q && !rp_prev;
    tp_prev = tp_q;
    rp_prev = rp_q;
    if (t_edge) begin
      if (x_q) lost_t_q = lost_t_q + 1;
      else     arm_t = 1'b1;
    end
    if (r_edge) begin
      if (x_q) lost_r_q = lost_r_q + 1;
      else     arm_r = 1'b1;
    end
    if ((t_edge || r_edge) && arm_t && arm_r && !x_q) begin
      // The last arriving edge decides the operating mode.
      last_q = t_edge;
      arm_t  = 1'b0;
      arm_r  = 1'b0;
      x_q    = 1'b1;
      fork
        begin
          #(ETA_PS + int'(delay_code) * STEP_PS);
          x_q = 1'b0;
        end
      join_none
    end
  end

  assign phi_x  = x_q;
  assign phi_tp = tp_q;
  assign phi_rp = rp_q;
  assign t_last = last_q;
  assign lost_t = lost_t_q;
  assign lost_r = lost_r_q;

endmodule

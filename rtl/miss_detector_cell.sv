// miss_detector_cell: behavioural model of the asynchronous front end of the
// miss detector.
//
// This is a behavioural model, not synthesizable logic: on silicon it is a
// few transistor stacks next to the latch controller. A "miss" is a rising
// edge of Phi_T' or Phi_U' that reaches the latch controller while Phi_X is
// still high, that is before the controller's self-reset has completed; the
// edge is then lost. A "near miss" is such an edge or one that arrives less
// than NEAR_PS after the self-reset has completed. Three flags are provided:
//   * y_miss    - a miss on either input (the single output of the basic
//                 detector, used to search the rate multiplier's sequences);
//   * y_near_t  - a (near) miss on the transmitter input;
//   * y_near_u  - a (near) miss on the receiver input (Phi_R or Phi_U).
// The two separate near-miss flags are the extension used for plesiochronous
// and arbitrary clocks. Each flag is set asynchronously and stays set until
// its ack input (from miss_sync, in the clock domain that reads the flag) is
// high; while ack is high the flag is held clear. Observing the delayed
// inputs Phi_T'/Phi_U' rather than the raw clocks, the margin value and the
// ack-based clearing are this implementation's choices.
`timescale 1ps/1ps
module miss_detector_cell #(
  parameter int unsigned NEAR_PS = 100
) (
  input  logic phi_tp,       // Phi_T' from the latch controller
  input  logic phi_up,       // Phi_R' / Phi_U' from the latch controller
  input  logic phi_x,
  input  logic ack_miss,
  input  logic ack_near_t,
  input  logic ack_near_u,
  output logic y_miss,
  output logic y_near_t,
  output logic y_near_u
);

  longint t_fall;
  logic   miss_q;
  logic   near_t_q;
  logic   near_u_q;

  initial begin
    t_fall   = -64'sd1_000_000_000;
    miss_q   = 1'b0;
    near_t_q = 1'b0;
    near_u_q = 1'b0;
  end

  // Time at which the last self-reset completed.
  always @(negedge phi_x) t_fall = $time;

  function automatic logic near_now(input logic x, input longint tf);
    return x || (($time - tf) < longint'(NEAR_PS));
  endfunction

  always @(posedge phi_tp or posedge phi_up or posedge ack_miss) begin
    if (ack_miss)   miss_q = 1'b0;
    else if (phi_x) miss_q = 1'b1;
  end

  always @(posedge phi_tp or posedge ack_near_t) begin
    if (ack_near_t)                 near_t_q = 1'b0;
    else if (near_now(phi_x, t_fall)) near_t_q = 1'b1;
  end

  always @(posedge phi_up or posedge ack_near_u) begin
    if (ack_near_u)                 near_u_q = 1'b0;
    else if (near_now(phi_x, t_fall)) near_u_q = 1'b1;
  end

  assign y_miss   = miss_q;
  assign y_near_t = near_t_q;
  assign y_near_u = near_u_q;

endmodule

// rate_multiplier: makes Phi_U, an approximation of the slower transmitter
// clock, out of the faster receiver clock Phi_R.
//
// Described here for the receiver side. With a faster transmitter the same
// module runs on Phi_T with the ratio terms exchanged (n_t = N_R,
// n_r = N_T), and its pulse says which Phi_T edges carry a word.
//
// For every N_R cycles of Phi_R it passes N_T of them, spread as evenly as
// possible, following the accumulator of the source design: in each Phi_R
// cycle, if sum >= 0 a pulse is given and sum grows by N_T - N_R, otherwise
// sum grows by N_T. Over any N_R consecutive cycles sum takes every value in
// {N_T-N_R, ..., N_T-1} once, so the starting value only selects one of N_R
// equivalent pulse sequences. Two inputs move between those sequences:
//   * shift adds one more to sum in the cycle it is high (the source design
//     adds N_T+1 or N_T-N_R+1 instead of N_T or N_T-N_R); it is driven by the
//     miss detector during initialization to search for the most robust
//     sequence;
//   * offset_valid adds the signed offset once; it is the first-order
//     correction used with arbitrary clocks.
// n_t and n_r are inputs so the ratio can be measured at run time; they
// should satisfy 0 < n_t <= n_r. The signed width of sum and of offset, the
// reset value 0 and the shift/offset ports are this implementation's choices.
//
// Timing: pulse is high during the Phi_R cycle whose closing rising edge is
// to be passed on as a Phi_U event (feed it to clock_gate together with
// Phi_R). sum updates on every rising edge of clk.
`timescale 1ps/1ps
module rate_multiplier #(
  parameter int unsigned W = stari_pkg::RATIO_W
) (
  input  logic                clk,          // Phi_R (or Phi_T, see above)
  input  logic                rst_n,        // asynchronous, active low
  input  logic [W-1:0]        n_t,          // pulses per period
  input  logic [W-1:0]        n_r,          // Phi_R cycles per period
  input  logic                shift,        // move to the next sum sequence
  input  logic                offset_valid, // apply offset once
  input  logic signed [W+1:0] offset,
  output logic                pulse,        // pass the next Phi_R edge
  output logic signed [W+1:0] sum
);

  logic signed [W+1:0] step;
  logic signed [W+1:0] extra;

  // Pulse whenever the accumulator is non-negative.
  assign pulse = (sum >= 0);

  always_comb begin
    step  = pulse ? ($signed({2'b00, n_t}) - $signed({2'b00, n_r}))
                  :  $signed({2'b00, n_t});
    extra = (offset_valid ? offset : '0) + (shift ? (W+2)'(1) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else        sum <= sum + step + extra;
  end

endmodule

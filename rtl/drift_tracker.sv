// drift_tracker: keeps the rate multiplier of the faster client locked to
// the slower client's clock when the two clocks are arbitrary.
//
// The start-up measurement gives only an approximate ratio n_t/n_r, so the
// latch controller's operating point drifts slowly and now and then a
// near-miss is reported, either for Phi_U (this client's rate-multiplied
// clock) or for Phi_T (the other client's clock). The names follow the
// receiver-faster case; a faster transmitter feeds its own near-misses to
// near_u and the receiver's to near_t. The tracker keeps the
// ratio with FRAC_BITS extra fraction bits (it drives the rate multiplier
// with n_t_fine / n_r_fine, both scaled by 2**FRAC_BITS; the user forms
// n_r_fine = n_r << FRAC_BITS itself) and on each report
//   * applies a first-order correction of half a Phi_T period (n_r_fine/2
//     units of the rate multiplier's sum) that moves Phi_U back towards the
//     middle of the safe operating region: negative (Phi_U later) for a
//     near-miss on Phi_U, which means Phi_U has crept early, positive (Phi_U
//     earlier) for a near-miss on Phi_T, which means Phi_U has crept late;
//   * measures the time since the previous report with a cycle counter; when
//     the report is of the same kind as the previous one (the drift kept its
//     direction through the correction) and came within LONG_INTERVAL
//     cycles, it moves n_t_fine one step against the drift: down after
//     Phi_U reports, up after Phi_T reports.
// The source design states that the interval between near-miss events is
// measured and used to update the estimate, and that an offset is added to
// sum; the update law, fraction width, threshold and offset size are this
// implementation's choices.
//
// Interface: load (one cycle) takes load_n_t/n_r as the new ratio;
// near_u and near_t are one-cycle pulses from miss_sync. offset_valid pulses
// for one cycle with offset, in the cycle after a report. n_r must be below
// 2**(W-FRAC_BITS).
`timescale 1ps/1ps
module drift_tracker #(
  parameter int unsigned W             = stari_pkg::RATIO_W,
  parameter int unsigned INTERVAL_W    = 20,
  parameter int unsigned LONG_INTERVAL = 65536,
  parameter int unsigned FRAC_BITS     = 4
) (
  input  logic                  clk,            // clock of the faster client
  input  logic                  rst_n,          // asynchronous, active low
  input  logic                  load,
  input  logic [W-1:0]          load_n_t,
  input  logic [W-1:0]          n_r,
  input  logic                  near_u,
  input  logic                  near_t,
  output logic [W-1:0]          n_t,            // n_t_fine
  output logic                  offset_valid,
  output logic signed [W+1:0]   offset,
  output logic [INTERVAL_W-1:0] last_interval,
  output logic [15:0]           updates         // frequency updates made
);

  logic [INTERVAL_W-1:0] since_q;
  logic [W-1:0]          n_r_fine;
  logic                  report;
  logic signed [W+1:0]   half_period;
  logic                  last_u_q;        // previous report was on Phi_U
  logic                  have_last_q;
  logic                  same_kind;

  assign n_r_fine    = n_r << FRAC_BITS;
  assign report      = near_u ^ near_t;   // simultaneous reports cancel
  assign half_period = $signed({3'b000, n_r_fine[W-1:1]});
  assign same_kind   = have_last_q && (last_u_q == near_u);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_t           <= '0;
      since_q       <= '0;
      offset_valid  <= 1'b0;
      offset        <= '0;
      last_interval <= '0;
      updates       <= '0;
      last_u_q      <= 1'b0;
      have_last_q   <= 1'b0;
    end else begin
      offset_valid <= 1'b0;
      if (since_q != '1) since_q <= since_q + 1'b1;
      if (load) begin
        n_t         <= load_n_t << FRAC_BITS;
        since_q     <= '0;
        have_last_q <= 1'b0;
      end else if (report) begin
        since_q       <= '0;
        last_interval <= since_q;
        offset_valid  <= 1'b1;
        offset        <= near_u ? -half_period : half_period;
        last_u_q      <= near_u;
        have_last_q   <= 1'b1;
        if (same_kind && since_q < INTERVAL_W'(LONG_INTERVAL)) begin
          updates <= updates + 1'b1;
          if (near_u && n_t > W'(1))    n_t <= n_t - 1'b1;
          if (near_t && n_t < n_r_fine) n_t <= n_t + 1'b1;
        end
      end
    end
  end

endmodule

// stari_link: a clock-domain crossing built from a single self-timed FIFO
// stage (STARI with one stage), with the extensions for rationally related,
// closely matched and arbitrary clocks.
//
// Data path (all modes): the transmitter's word is held in latch-T, clocked
// by Phi_T; latch-X, the only FIFO stage, is clocked by Phi_X from the latch
// controller; latch-R is clocked by Phi_R. The latch controller fires Phi_X
// once it has seen a rising edge from both sides, so Phi_X always lies
// between the two clocks' edges, where set-up and hold of latch-X and latch-R
// are met. At equal frequencies this tolerates almost two clock periods of
// skew and needs no synchronizer on the data path.
//
// The faster side's clock reaches the controller through a rate
// multiplier that removes some of its edges: Phi_U on the receiver side,
// or, for a faster transmitter in MODE_RATIONAL, a thinned Phi_T. The mode
// input selects the clocking situation:
//   MODE_MESO       same frequency: every edge is passed (ratio 1/1). After
//                   a minimum-latency start-up a near-miss on Phi_U makes
//                   the receiver skip one event, back to receiver-last.
//   MODE_RATIONAL   clock frequencies f_T : f_R = NT : NR. With NT < NR the
//                   receiver passes NT of every NR Phi_R edges; with
//                   NT > NR (chosen when the link is built) the transmitter
//                   passes NR of every NT Phi_T edges and holds tx_ready low
//                   on the others. A miss during start-up shifts that rate
//                   multiplier to its next pulse sequence, so the ramp finds
//                   the most robust one.
//   MODE_PLESIO     ratio 1/1 with near-miss slips: a near-miss on Phi_T
//                   makes the transmitter skip one cycle (a stuff cycle,
//                   tx_ready low), a near-miss on Phi_R makes the receiver
//                   skip clocking the controller once (no word that cycle).
//   MODE_ARBITRARY  each side measures the other's forwarded clock over
//                   EST_WINDOW of its own cycles. The faster side (decided
//                   by the receiver's count) runs its rate multiplier at
//                   the measured ratio and lets near-misses trim it; the
//                   other side passes every edge.
// The source design works out the receiver-faster case and states that a
// faster transmitter uses the same rate multiplier in its own domain; the
// transmitter-side wiring here (tx_ready as the pulse flag) is this
// implementation's, as is the way the two sides agree which is faster.
//
// Start-up (tx domain; with arbitrary clocks only once the ratio is
// known): the self-reset delay of the controller is ramped
// down from a large value (maximum-robustness initialization); then, if
// min_latency is set, one Phi_T event is suppressed to force
// transmitter-last operation (minimum-latency initialization). init_done
// rises when this is over; words sent before it may be lost or duplicated.
//
// Interface and timing. Transmitter: tx_data is taken on a rising edge of
// phi_t when tx_ready was high in the cycle before it; when tx_ready is low
// the transmitter must hold its word. Receiver: rx_data is valid in the
// phi_r cycles where rx_valid is high; a word passed to Phi_U on edge k is
// presented after edge k+1. Latency from the transmitter edge is below two
// receiver periods. A receiver that prefers to pull words uses rx_avail,
// rx_word and rx_take instead of rx_valid/rx_data: a small FIFO stores the
// words it has not taken yet and passes the arriving word straight through
// when empty (rx_fifo). Status pulses: miss, slip_r, correction (rx domain),
// slip_t (tx domain); a miss is reported on miss_t (tx domain) instead of
// miss when the rate multiplier is on the transmitter side (NT > NR), and
// correction_t (tx) replaces correction when the transmitter is the faster
// side with arbitrary clocks. est_valid (rx) says the receiver's
// measurement is done.
//
// The latch controller and miss detector front end are behavioural models
// (they are transistor circuits); everything else is synthesizable. Mode
// encoding, widths, all counter lengths and the delay values are this
// implementation's choices; NT/NR default to the 3/5 example of the source.
`timescale 1ps/1ps
module stari_link
  import stari_pkg::*;
#(
  parameter int unsigned WIDTH            = 8,
  parameter int unsigned NT               = 3,
  parameter int unsigned NR               = 5,
  parameter int unsigned SYNC_STAGES      = 3,
  parameter int unsigned RAMP_STEP_CYCLES = 32,
  parameter int unsigned INIT_SETTLE      = 64,
  parameter int unsigned INIT_RESOLVE     = 64,
  parameter int unsigned SLIP_HOLDOFF     = 16,
  parameter int unsigned EST_WINDOW       = 1024,
  parameter int unsigned TRACK_LONG       = 65536,
  parameter int unsigned TRACK_FRAC       = 4,
  parameter int unsigned DELAY_T_PS       = 60,
  parameter int unsigned DELAY_R_PS       = 40,
  parameter int unsigned ETA_PS           = 250,
  parameter int unsigned STEP_PS          = 25,
  parameter int unsigned NEAR_PS          = 100,
  parameter int unsigned RX_FIFO_DEPTH    = 4
) (
  // transmitter domain
  input  logic             phi_t,
  input  logic             rst_t_n,
  input  logic [WIDTH-1:0] tx_data,
  output logic             tx_ready,
  output logic             init_done,
  output logic             slip_t,
  output logic             miss_t,
  output logic             correction_t,
  // receiver domain
  input  logic             phi_r,
  input  logic             rst_r_n,
  output logic [WIDTH-1:0] rx_data,
  output logic             rx_valid,
  // receiver domain, passive view through the receive FIFO
  output logic             rx_avail,
  output logic [WIDTH-1:0] rx_word,
  input  logic             rx_take,
  output logic             rx_overflow,
  output logic             miss,
  output logic             slip_r,
  output logic             correction,
  output logic             est_valid,
  // static configuration
  input  link_mode_e       mode,
  input  logic             min_latency,
  // observation of the controller's operating mode
  output logic             t_last
);

  localparam int unsigned W = RATIO_W;
  // the faster transmitter of a rational link carries the rate multiplier
  localparam bit TX_FASTER = NT > NR;

  // ------------------------------------------------------------------
  // transmitter domain: start-up and stuff cycles
  // ------------------------------------------------------------------
  logic [DELAY_CODE_W-1:0] delay_code;
  logic                    ramp_done;
  logic                    mli_t_en, mli_done;
  logic                    slip_t_en;
  logic                    t_en;
  logic                    t_rm_en;
  logic                    gphi_t;
  logic                    near_t_tx, ack_near_t_tx;
  logic                    near_u_tx, ack_near_u_tx;
  logic                    ramp_start;
  // arbitrary clocks: the transmitter's own measurement and tracker
  logic [W-1:0]            est_t_count, trk_t_n_t;
  logic                    est_t_valid, est_t_valid_q;
  logic [SYNC_STAGES-1:0]  lead_s, decided_s;
  logic                    tx_lead_r, rx_decided_r;
  logic                    tx_role, tx_role_q;
  logic                    arb_ready_t;
  logic                    trk_t_off_valid;
  logic signed [W+1:0]     trk_t_offset;
  logic [19:0]             trk_t_interval;
  logic [15:0]             trk_t_updates;
  logic [W-1:0]            tm_n_t, tm_n_r;
  logic signed [W+1:0]     t_rm_sum;

  reset_delay_ramp #(
    .CODE_W     (DELAY_CODE_W),
    .STEP_CYCLES(RAMP_STEP_CYCLES)
  ) u_ramp (
    .clk  (phi_t),
    .rst_n(rst_t_n),
    .start(ramp_start),
    .code (delay_code),
    .done (ramp_done)
  );

  min_latency_init #(
    .SETTLE_CYCLES (INIT_SETTLE),
    .RESOLVE_CYCLES(INIT_RESOLVE)
  ) u_mli (
    .clk  (phi_t),
    .rst_n(rst_t_n),
    .start(ramp_done && min_latency),
    .t_en (mli_t_en),
    .done (mli_done)
  );

  assign init_done = ramp_done && (!min_latency || mli_done);

  slip_control #(
    .HOLDOFF_CYCLES(SLIP_HOLDOFF)
  ) u_slip_t (
    .clk    (phi_t),
    .rst_n  (rst_t_n),
    .enable (mode == MODE_PLESIO && init_done),
    .request(near_t_tx),
    .clk_en (slip_t_en),
    .slip   (slip_t)
  );

  // Arbitrary clocks. Both sides measure the other's forwarded clock. The
  // receiver decides which side is faster (its count above EST_WINDOW means
  // Phi_T is faster) and passes the decision over as two levels; a faster
  // transmitter then loads its own measurement into its tracker. The delay
  // ramp waits for the decision so that start-up runs at the final ratio.
  always_ff @(posedge phi_t or negedge rst_t_n) begin
    if (!rst_t_n) begin
      lead_s        <= '0;
      decided_s     <= '0;
      est_t_valid_q <= 1'b0;
      tx_role_q     <= 1'b0;
    end else begin
      lead_s        <= {lead_s[SYNC_STAGES-2:0], tx_lead_r};
      decided_s     <= {decided_s[SYNC_STAGES-2:0], rx_decided_r};
      est_t_valid_q <= est_t_valid;
      tx_role_q     <= tx_role;
    end
  end

  assign tx_role     = mode == MODE_ARBITRARY && lead_s[SYNC_STAGES-1] && est_t_valid;
  assign arb_ready_t = decided_s[SYNC_STAGES-1] && (est_t_valid || !lead_s[SYNC_STAGES-1]);
  assign ramp_start  = mode != MODE_ARBITRARY || arb_ready_t;

  freq_estimator #(
    .W     (W),
    .WINDOW(EST_WINDOW)
  ) u_est_t (
    .clk   (phi_t),
    .rst_n (rst_t_n),
    .start (mode == MODE_ARBITRARY && !est_t_valid && !est_t_valid_q),
    .fclk  (phi_r),
    .frst_n(rst_r_n),
    .count (est_t_count),
    .valid (est_t_valid)
  );

  // Phi_T' is this side's own (rate-multiplied) clock, Phi_R the other's.
  drift_tracker #(
    .W            (W),
    .INTERVAL_W   (20),
    .LONG_INTERVAL(TRACK_LONG),
    .FRAC_BITS    (TRACK_FRAC)
  ) u_track_t (
    .clk          (phi_t),
    .rst_n        (rst_t_n),
    .load         (tx_role && !tx_role_q),
    .load_n_t     (est_t_count),
    .n_r          (W'(EST_WINDOW)),
    .near_u       (near_t_tx && tx_role),
    .near_t       (near_u_tx),
    .n_t          (trk_t_n_t),
    .offset_valid (trk_t_off_valid),
    .offset       (trk_t_offset),
    .last_interval(trk_t_interval),
    .updates      (trk_t_updates)
  );

  assign correction_t = trk_t_off_valid;

  // Transmitter-side rate multiplier: NR of every NT Phi_T edges reach the
  // controller for a rational link built with NT > NR, the measured ratio
  // for a faster transmitter with arbitrary clocks, every edge otherwise.
  // The sequence shifts on a miss, as on the receiver side.
  always_comb begin
    if (mode == MODE_RATIONAL && TX_FASTER) begin
      tm_n_t = W'(NR);
      tm_n_r = W'(NT);
    end else if (tx_role) begin
      tm_n_t = trk_t_n_t;
      tm_n_r = W'(EST_WINDOW << TRACK_FRAC);
    end else begin
      tm_n_t = W'(1);
      tm_n_r = W'(1);
    end
  end

  rate_multiplier #(
    .W(W)
  ) u_rate_t (
    .clk         (phi_t),
    .rst_n       (rst_t_n),
    .n_t         (tm_n_t),
    .n_r         (tm_n_r),
    .shift       (miss_t && mode == MODE_RATIONAL && !init_done),
    .offset_valid(trk_t_off_valid),
    .offset      (trk_t_offset),
    .pulse       (t_rm_en),
    .sum         (t_rm_sum)
  );

  assign t_en     = mli_t_en && slip_t_en && t_rm_en;
  assign tx_ready = t_en;

  clock_gate u_gate_t (
    .clk (phi_t),
    .en  (t_en),
    .gclk(gphi_t)
  );

  // ------------------------------------------------------------------
  // data path: latch-T, latch-X, latch-R
  // ------------------------------------------------------------------
  logic [WIDTH-1:0] q_t, q_x;
  logic             phi_x, phi_tp, phi_up;
  logic             gphi_u;
  int unsigned      lost_t, lost_r;

  stage_reg #(.WIDTH(WIDTH)) u_latch_t (.clk(gphi_t), .d(tx_data), .q(q_t));
  stage_reg #(.WIDTH(WIDTH)) u_latch_x (.clk(phi_x),  .d(q_t),     .q(q_x));
  stage_reg #(.WIDTH(WIDTH)) u_latch_r (.clk(phi_r),  .d(q_x),     .q(rx_data));

  latch_controller #(
    .DELAY_T_PS(DELAY_T_PS),
    .DELAY_R_PS(DELAY_R_PS),
    .ETA_PS    (ETA_PS),
    .STEP_PS   (STEP_PS),
    .CODE_W    (DELAY_CODE_W)
  ) u_ctrl (
    .phi_t     (gphi_t),
    .phi_r     (gphi_u),
    .delay_code(delay_code),
    .phi_x     (phi_x),
    .phi_tp    (phi_tp),
    .phi_rp    (phi_up),
    .t_last    (t_last),
    .lost_t    (lost_t),
    .lost_r    (lost_r)
  );

  // ------------------------------------------------------------------
  // miss detector: asynchronous front end and synchronizers
  // ------------------------------------------------------------------
  logic y_miss, y_near_t, y_near_u;
  logic ack_miss, ack_near_u, ack_near_t_rx;
  logic near_u_rx, near_t_rx;

  miss_detector_cell #(
    .NEAR_PS(NEAR_PS)
  ) u_miss_cell (
    .phi_tp    (phi_tp),
    .phi_up    (phi_up),
    .phi_x     (phi_x),
    .ack_miss  (ack_miss),
    .ack_near_t(mode == MODE_ARBITRARY && !tx_role ? ack_near_t_rx : ack_near_t_tx),
    .ack_near_u(tx_role ? ack_near_u_tx : ack_near_u),
    .y_miss    (y_miss),
    .y_near_t  (y_near_t),
    .y_near_u  (y_near_u)
  );

  // Misses go to the domain whose rate multiplier searches the sequences.
  if (TX_FASTER) begin : g_miss_tx
    miss_sync #(.STAGES(SYNC_STAGES)) u_sync_miss (
      .clk(phi_t), .rst_n(rst_t_n), .y_async(y_miss), .ack(ack_miss), .miss(miss_t)
    );
    assign miss = 1'b0;
  end else begin : g_miss_rx
    miss_sync #(.STAGES(SYNC_STAGES)) u_sync_miss (
      .clk(phi_r), .rst_n(rst_r_n), .y_async(y_miss), .ack(ack_miss), .miss(miss)
    );
    assign miss_t = 1'b0;
  end

  miss_sync #(.STAGES(SYNC_STAGES)) u_sync_near_u (
    .clk(phi_r), .rst_n(rst_r_n), .y_async(y_near_u && !tx_role), .ack(ack_near_u),
    .miss(near_u_rx)
  );

  // Near-miss on Phi_U to a faster transmitter with arbitrary clocks.
  miss_sync #(.STAGES(SYNC_STAGES)) u_sync_near_u_tx (
    .clk(phi_t), .rst_n(rst_t_n), .y_async(y_near_u && tx_role), .ack(ack_near_u_tx),
    .miss(near_u_tx)
  );

  // Near-miss on Phi_T: to the transmitter for stuff cycles (plesiochronous),
  // to the faster side's ratio tracker (arbitrary clocks).
  miss_sync #(.STAGES(SYNC_STAGES)) u_sync_near_t_tx (
    .clk(phi_t), .rst_n(rst_t_n), .y_async(y_near_t && (mode != MODE_ARBITRARY || tx_role)),
    .ack(ack_near_t_tx), .miss(near_t_tx)
  );

  miss_sync #(.STAGES(SYNC_STAGES)) u_sync_near_t_rx (
    .clk(phi_r), .rst_n(rst_r_n), .y_async(y_near_t && mode == MODE_ARBITRARY && !tx_role),
    .ack(ack_near_t_rx), .miss(near_t_rx)
  );

  // ------------------------------------------------------------------
  // receiver domain: ratio, rate multiplier, slips, valid
  // ------------------------------------------------------------------
  logic [W-1:0]        est_count, arb_n_t, arb_n_r;
  logic                est_valid_q;
  logic                rx_role;     // receiver is the faster side
  logic                track_load;
  logic                trk_off_valid;
  logic signed [W+1:0] trk_offset;
  logic [19:0]         trk_interval;
  logic [15:0]         trk_updates;
  logic [W-1:0]        rm_n_t, rm_n_r;
  logic                rm_pulse;
  logic signed [W+1:0] rm_sum;
  logic                slip_r_en;
  logic                u_en;
  logic                valid_q;
  logic [$clog2(RX_FIFO_DEPTH+1)-1:0] rx_fifo_level;

  // End of start-up seen in the receiver domain: stops the sequence search
  // and enables the receiver-last fallback.
  logic [SYNC_STAGES-1:0] init_done_s;
  logic                   init_done_r;

  always_ff @(posedge phi_r or negedge rst_r_n) begin
    if (!rst_r_n) init_done_s <= '0;
    else          init_done_s <= {init_done_s[SYNC_STAGES-2:0], init_done};
  end

  assign init_done_r = init_done_s[SYNC_STAGES-1];

  freq_estimator #(
    .W     (W),
    .WINDOW(EST_WINDOW)
  ) u_est (
    .clk   (phi_r),
    .rst_n (rst_r_n),
    .start (mode == MODE_ARBITRARY && !est_valid && !est_valid_q),
    .fclk  (phi_t),
    .frst_n(rst_t_n),
    .count (est_count),
    .valid (est_valid)
  );

  always_ff @(posedge phi_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      est_valid_q  <= 1'b0;
      rx_role      <= 1'b0;
      tx_lead_r    <= 1'b0;
      rx_decided_r <= 1'b0;
    end else begin
      est_valid_q  <= est_valid;
      rx_role      <= est_valid && est_count <= W'(EST_WINDOW);
      tx_lead_r    <= est_valid && est_count > W'(EST_WINDOW);
      rx_decided_r <= est_valid;
    end
  end

  assign track_load = est_valid && !est_valid_q && est_count <= W'(EST_WINDOW);
  assign arb_n_r    = W'(EST_WINDOW << TRACK_FRAC);

  drift_tracker #(
    .W            (W),
    .INTERVAL_W   (20),
    .LONG_INTERVAL(TRACK_LONG),
    .FRAC_BITS    (TRACK_FRAC)
  ) u_track (
    .clk          (phi_r),
    .rst_n        (rst_r_n),
    .load         (track_load),
    .load_n_t     (est_count),
    .n_r          (W'(EST_WINDOW)),
    .near_u       (near_u_rx && mode == MODE_ARBITRARY),
    .near_t       (near_t_rx),
    .n_t          (arb_n_t),
    .offset_valid (trk_off_valid),
    .offset       (trk_offset),
    .last_interval(trk_interval),
    .updates      (trk_updates)
  );

  assign correction = trk_off_valid;

  always_comb begin
    unique case (mode)
      MODE_RATIONAL: begin
        rm_n_t = TX_FASTER ? W'(1) : W'(NT);
        rm_n_r = TX_FASTER ? W'(1) : W'(NR);
      end
      MODE_ARBITRARY: begin
        // nothing passes until measured; every edge if Phi_T is faster
        rm_n_t = !est_valid_q ? '0 : rx_role ? arb_n_t : arb_n_r;
        rm_n_r = arb_n_r;
      end
      default: begin
        rm_n_t = W'(1);
        rm_n_r = W'(1);
      end
    endcase
  end

  rate_multiplier #(
    .W(W)
  ) u_rate (
    .clk         (phi_r),
    .rst_n       (rst_r_n),
    .n_t         (rm_n_t),
    .n_r         (rm_n_r),
    .shift       (miss && mode == MODE_RATIONAL && !init_done_r),
    .offset_valid(trk_off_valid),
    .offset      (trk_offset),
    .pulse       (rm_pulse),
    .sum         (rm_sum)
  );

  // Same frequency with minimum-latency start-up: a near-miss on Phi_U after
  // start-up means transmitter-last operation is at its limit, and one
  // skipped Phi_R event returns the controller to receiver-last.
  slip_control #(
    .HOLDOFF_CYCLES(SLIP_HOLDOFF)
  ) u_slip_r (
    .clk    (phi_r),
    .rst_n  (rst_r_n),
    .enable (mode == MODE_PLESIO || (mode == MODE_MESO && min_latency && init_done_r)),
    .request(near_u_rx),
    .clk_en (slip_r_en),
    .slip   (slip_r)
  );

  assign u_en = rm_pulse && slip_r_en;

  clock_gate u_gate_u (
    .clk (phi_r),
    .en  (u_en),
    .gclk(gphi_u)
  );

  // A Phi_U event on edge k loads latch-X before edge k+1, where latch-R
  // captures it: the valid flag follows the pulse by two edges.
  always_ff @(posedge phi_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      valid_q  <= 1'b0;
      rx_valid <= 1'b0;
    end else begin
      valid_q  <= u_en;
      rx_valid <= valid_q;
    end
  end

  rx_fifo #(
    .WIDTH(WIDTH),
    .DEPTH(RX_FIFO_DEPTH)
  ) u_rx_fifo (
    .clk      (phi_r),
    .rst_n    (rst_r_n),
    .in_valid (rx_valid),
    .in_data  (rx_data),
    .out_avail(rx_avail),
    .out_data (rx_word),
    .take     (rx_take),
    .overflow (rx_overflow),
    .level    (rx_fifo_level)
  );

endmodule

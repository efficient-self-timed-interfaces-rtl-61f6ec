// stari_pkg: types and constants shared by the single-stage STARI link.
//
// The link crosses data from a transmitter clock domain (Phi_T) to a
// receiver clock domain (Phi_R) through one self-timed FIFO stage. The same
// hardware serves four clocking situations; link_mode_e selects which
// correction loops are active. The four situations (same frequency, rational
// frequency ratio, closely matched frequencies, arbitrary frequencies) follow
// the source design; the two-bit encoding and the widths below are this
// implementation's own choices.
`timescale 1ps/1ps
package stari_pkg;

  // Clocking situation of the link.
  typedef enum logic [1:0] {
    MODE_MESO      = 2'd0,  // same frequency, unknown phase (rate 1/1)
    MODE_RATIONAL  = 2'd1,  // Phi_T/Phi_R frequency ratio NT/NR known in advance
    MODE_PLESIO    = 2'd2,  // independent clocks matched to a few ppm
    MODE_ARBITRARY = 2'd3   // independent clocks, ratio measured at start-up
  } link_mode_e;

  // Width of the rate multiplier's ratio terms N_T and N_R.
  localparam int unsigned RATIO_W = 16;

  // Width of the self-reset delay code driven by the initialization ramp.
  localparam int unsigned DELAY_CODE_W = 6;

endpackage

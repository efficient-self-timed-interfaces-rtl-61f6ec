// clock_gate: glitch-free clock gate used to suppress single clock events.
//
// The link removes individual rising edges from a clock in three places: the
// rate multiplier (Phi_U is Phi_R with some edges removed), the
// minimum-latency initialization (one Phi_T event suppressed) and the
// plesiochronous correction (a skipped transmitter or receiver event). The
// enable is captured by a level-sensitive latch while clk is low and ANDed
// with clk, the usual integrated clock gate, so a change of en after a rising
// edge acts on the next rising edge and never cuts a high phase short.
//
// Interface: en is produced by logic clocked on the rising edge of clk;
// gclk carries the rising edge of cycle k+1 if en was high during cycle k.
`timescale 1ps/1ps
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule

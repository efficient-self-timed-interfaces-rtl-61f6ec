// rx_fifo: small FIFO in the receiver's clock domain that turns the link's
// active receive interface into a passive one.
//
// Without it the link tells the receiver when a word arrives (in_valid) and
// the receiver must take it in that very cycle. With it the receiver pulls:
// out_avail says a word can be taken, and take (in the same cycle) removes
// it. Words that arrive while the receiver is not taking are stored, up to
// DEPTH of them. When the FIFO is empty an arriving word is offered on
// out_data straight from in_data, so the FIFO adds only a multiplexer to the
// latency of the link. A word that arrives while the FIFO is full and
// nothing is taken is dropped, and overflow stays set until reset: the
// receiver has to take words, on average, at least as fast as they arrive.
//
// The source design only says that a FIFO and a little control logic, all
// in the receiver's domain and costing one multiplexer delay, make the
// interface passive. The depth, the bypass structure and the overflow flag
// are this implementation's choices.
//
// Timing: everything is clocked by the receiver clock. out_avail and
// out_data depend combinationally on in_valid/in_data (bypass) and on the
// stored words; take is sampled at the next rising edge.
`timescale 1ps/1ps
module rx_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,      // asynchronous, active low
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_avail,
  output logic [WIDTH-1:0] out_data,
  input  logic             take,
  output logic             overflow,
  output logic [$clog2(DEPTH+1)-1:0] level  // words stored
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [CW-1:0]    count_q;
  logic             empty, full, bypass, push, pop;

  assign empty  = count_q == '0;
  assign full   = count_q == CW'(DEPTH);
  assign bypass = empty && in_valid;

  assign out_avail = !empty || in_valid;
  assign out_data  = empty ? in_data : mem[rd_q];

  // a bypassed word that is taken at once is never stored
  assign pop  = take && !empty;
  assign push = in_valid && !(bypass && take) && (!full || pop);

  assign level = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q     <= '0;
      wr_q     <= '0;
      count_q  <= '0;
      overflow <= 1'b0;
    end else begin
      if (pop)  rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      if (push) wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      count_q <= count_q + CW'(push) - CW'(pop);
      if (in_valid && full && !pop) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= in_data;
  end

  // the receiver only takes what is offered
  a_take_avail: assert property (@(posedge clk) disable iff (!rst_n) take |-> out_avail)
    else $error("rx_fifo: take without a word available");

endmodule

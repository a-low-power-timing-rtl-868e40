// master_slave_ff: one-bit master-slave flip-flop with separately driven
// master and slave latch clocks.
//
// The master latch is transparent while `cm` is high and holds while it is
// low; the slave latch is transparent while `clk1` is high and holds the
// master's value while it is low. Driven with cm = ~clk and clk1 = clk it is
// an ordinary rising-edge flip-flop: the master follows `d` in the low half
// of the clock and closes at the rising edge, when the slave opens and shows
// the captured bit on `q` for the high half.
//
// Splitting the two clocks is what the error-tolerant flip-flop is built on:
// raising `cm` again while `clk1` is still high reopens the master, so a data
// bit that arrives after the rising edge still runs through both latches to
// `q` inside the same cycle. The Clk / Clk1 / Q / Q1 pins follow the
// flip-flop symbol of the circuit this is modelled on; which level of each
// clock makes its latch transparent, and the lack of a reset, are choices of
// this design.
//
// Interface: d, cm (master clock), clk1 (slave clock) in; q and qb = ~q out.
// Timing: purely level-sensitive, no internal delay.
`timescale 1ns / 1ps
module master_slave_ff (
  input  logic d,
  input  logic cm,
  input  logic clk1,
  output logic q,
  output logic qb
);
  logic master_q;

  // Master latch: transparent while cm is high.
  always_latch begin
    if (cm) master_q = d;
  end

  // Slave latch: transparent while clk1 is high.
  always_latch begin
    if (clk1) q = master_q;
  end

  assign qb = ~q;
endmodule

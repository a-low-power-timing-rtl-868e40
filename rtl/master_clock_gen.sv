// master_clock_gen: builds the master latch clock CM of the error-tolerant
// flip-flop from the system clock and the error pulse.
//
// The gate network is one inverter and one OR gate: CM = ~clk | er. With no
// error CM is the inverted system clock, so the master latch closes at every
// rising edge of clk. While the transition detector holds `er` high, CM is
// forced high and the master latch opens again for the length of the pulse,
// letting a late data bit through to the (still open) slave latch. The
// system clock itself is never altered.
//
// The gate types come from the circuit description; that the inverter sits
// on the clock input is this design's reading of how the two are joined.
//
// Interface: clk (system clock), er (error pulse) in; cm out.
// Timing: combinational, no delay.
`timescale 1ns / 1ps
module master_clock_gen (
  input  logic clk,
  input  logic er,
  output logic cm
);
  logic clk_n;

  assign clk_n = ~clk;
  assign cm    = clk_n | er;
endmodule

// time_borrow_clock_gen: builds CLKDD, the master latch clock of the second
// pipeline stage, so that stage can borrow time from the next cycle.
//
// `ck` is the system clock delayed by the time-borrow amount. The second
// stage's master latch is transparent while CLKDD is high, and
//   clkdd = ~ck | (cm & clk).
// With no error this is the inverted delayed clock: the second master closes
// only when `ck` rises, so a bit reaching the second stage up to the clock
// delay after the rising edge of `clk` is still captured (its slave latch is
// already open on `clk`). The term cm & clk is high when the first stage is
// in an error window (its master clock forced high while clk is high); it
// holds the second master open too, so that an error that hits both stages
// in the same cycle is absorbed by the second stage as well.
//
// The pins cm, clk and ck and the output CLKDD come from the two-stage
// circuit description; the gate equation is this design's own, since the
// description gives only what the block must achieve.
//
// Interface: cm (first-stage master clock), clk (system clock), ck (delayed
// clock) in; clkdd out. Timing: combinational, no delay.
`timescale 1ns / 1ps
module time_borrow_clock_gen (
  input  logic cm,
  input  logic clk,
  input  logic ck,
  output logic clkdd
);
  logic ck_n;
  logic err_window;

  assign ck_n       = ~ck;
  assign err_window = cm & clk;
  assign clkdd      = ck_n | err_window;
endmodule

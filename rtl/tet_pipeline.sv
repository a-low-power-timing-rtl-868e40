// tet_pipeline: two-stage circuit with a timing-error-tolerant first stage
// and a time-borrowing second stage.
//
// Stage 1 is a tet_ff: it captures `d` at the rising edge of `clk` and
// corrects a late transition inside the same cycle by reopening its master
// latch. Its outputs qa / qb go to the logic between the stages, which lies
// outside this module: its result comes back in on `d2`. Stage 2 is a
// master-slave flip-flop whose slave latch runs on `clk` but whose master
// latch runs on CLKDD from time_borrow_clock_gen. CLKDD closes the second
// master only when the delayed clock `ck` rises, so stage 2 borrows the
// clock delay from the next cycle, and it also holds that master open while
// stage 1 is correcting an error, so a late bit in both stages in the same
// cycle is absorbed by both.
//
// The structure (one error-tolerant flip-flop, a second flip-flop clocked by
// CLKDD made from the first stage's master clock, clk and ck) follows the
// two-stage circuit description; the delayed clock is an input, as it is
// there. What the logic between the stages computes is not specified, so it
// is left outside.
//
// Interface: clk, ck (clk delayed by the borrow time, less than half a
// period), d (stage-1 data), d2 (stage-2 data) in; qa, qb (stage-1 output
// and complement), q2, q2b (stage-2 output and complement), er (stage-1
// error pulse), cm (stage-1 master clock), clkdd (stage-2 master clock) out.
// Timing: both stages capture at the rising edge of clk; stage 1 accepts a
// bit up to the end of the high half of clk, stage 2 up to the rising edge
// of ck, or later while er is high.
`timescale 1ns / 1ps
module tet_pipeline #(
  parameter realtime T_DLY = 1.5
) (
  input  logic clk,
  input  logic ck,
  input  logic d,
  input  logic d2,
  output logic qa,
  output logic qb,
  output logic q2,
  output logic q2b,
  output logic er,
  output logic cm,
  output logic clkdd
);
  tet_ff #(.T_DLY(T_DLY)) u_stage1 (
    .clk (clk),
    .d   (d),
    .q   (qa),
    .qb  (qb),
    .er  (er),
    .cm  (cm)
  );

  time_borrow_clock_gen u_tbgen (
    .cm    (cm),
    .clk   (clk),
    .ck    (ck),
    .clkdd (clkdd)
  );

  master_slave_ff u_stage2 (
    .d    (d2),
    .cm   (clkdd),
    .clk1 (clk),
    .q    (q2),
    .qb   (q2b)
  );
endmodule

// tet_ff: timing-error-tolerant flip-flop. A late data transition is
// detected and corrected inside the same clock cycle by reopening the
// flip-flop's master latch, without touching the system clock.
//
// The transition detector watches `d` during the high half of `clk`. A
// transition there means the data missed the rising edge; the detector
// emits a pulse `er`, the master clock generator turns it into a high pulse
// on the master clock `cm`, and the master latch opens again while the slave
// latch is still open on `clk`. The late bit then reaches `q` shortly after
// it arrives, and the master closes on it when the pulse ends. Without an
// error the cell is an ordinary rising-edge flip-flop.
//
// The three parts and the way they are joined follow the circuit
// description; the detector delay is a parameter of this design.
//
// Interface: clk (system clock), d in; q, qb (Q and its complement), er
// (error flag, one pulse per corrected transition) and cm (master clock) out.
// Timing: normal capture at the rising edge of clk; a transition of d that
// arrives in the high half of clk appears on q in the same cycle. Data must
// not change in the high half except for the late arrival of the bit that
// belongs to the current edge.
`timescale 1ns / 1ps
module tet_ff #(
  parameter realtime T_DLY = 1.5
) (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic qb,
  output logic er,
  output logic cm
);
  transition_detector #(.T_DLY(T_DLY)) u_det (
    .d   (d),
    .clk (clk),
    .er  (er)
  );

  master_clock_gen u_cmgen (
    .clk (clk),
    .er  (er),
    .cm  (cm)
  );

  master_slave_ff u_ff (
    .d    (d),
    .cm   (cm),
    .clk1 (clk),
    .q    (q),
    .qb   (qb)
  );
endmodule

// transition_detector: behavioural model (not synthesizable logic: it relies
// on a buffer-chain delay) of the detector that flags a late data transition
// at the input of the error-tolerant flip-flop.
//
// A buffer chain gives a copy of `d` delayed by T_DLY. Two AND gates compare
// the input with its delayed copy: one fires on a rising edge (d high, the
// delayed copy still low), the other on a falling edge (d low, the delayed
// copy still high); an inverter supplies each complemented term. Each AND
// gate is also gated by `clk`, so only a transition in the high half of the
// clock - after the rising edge that should already have captured the data,
// that is, a setup-time violation - counts as an error. The two AND outputs
// are merged into the error pulse `er`, which is therefore T_DLY wide and
// starts with the late transition.
//
// The inverter, buffers and AND gates and the detection of both directions
// follow the circuit description. The OR that merges the two AND outputs,
// gating by the clock's high phase, and the default T_DLY of 1.5 ns (for the
// 20 ns clock the circuit was shown with) are this design's choices.
//
// Interface: d (flip-flop data input), clk (system clock) in; er out.
// Timing: er rises with a late transition of d and lasts T_DLY. A transition
// that ends less than T_DLY before the rising edge also gives a short pulse
// at the edge; it reopens the master on the value it already holds and does
// no harm.
`timescale 1ns / 1ps
module transition_detector #(
  parameter realtime T_DLY = 1.5
) (
  input  logic d,
  input  logic clk,
  output logic er
);
  logic d_n;        // inverted input
  logic d_dly;      // input after the buffer chain
  logic d_dly_n;    // inverted delayed input
  logic rise_err;   // low-to-high transition in the error window
  logic fall_err;   // high-to-low transition in the error window

  assign d_n      = ~d;
  assign #(T_DLY) d_dly = d;
  assign d_dly_n  = ~d_dly;

  assign rise_err = d   & d_dly_n & clk;
  assign fall_err = d_n & d_dly   & clk;
  assign er       = rise_err | fall_err;
endmodule

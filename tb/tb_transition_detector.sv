// tb_transition_detector: drives the detector with a 20 ns clock and data
// transitions placed in the low half (on time) and in the high half (late)
// of the clock, in both directions. Every late transition must give exactly
// one error pulse that starts with the transition and lasts the buffer
// delay T_DLY; on-time transitions must give none.
`timescale 1ns / 1ps
module tb_transition_detector;
  localparam realtime T_DLY = 1.5;   // expected pulse width (the model's default)
  localparam realtime TOL   = 0.01;

  logic d, clk, er;
  int   checks = 0, failures = 0;
  int   pulses = 0;
  realtime rise_t, width;

  transition_detector dut (.d(d), .clk(clk), .er(er));

  always @(posedge er) begin
    pulses++;
    rise_t = $realtime;
  end
  always @(negedge er) width = $realtime - rise_t;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime late;
    int      exp_pulses;
    bit      is_late;
    d = 0; clk = 0;
    #20;
    exp_pulses = 0;
    for (int n = 0; n < 200; n++) begin
      is_late = (($urandom % 2) == 1);
      late    = 0.5 + real'($urandom % 600) / 100.0;   // 0.5 .. 6.49 ns
      if (!is_late) begin
        #4 d = ~d;                        // 6 ns before the edge
        #6 clk = 1;
        #1 check(er == 1'b0, "no pulse for on-time data");
        #9 clk = 0;
      end else begin
        #10 clk = 1;
        #(late) d = ~d;
        exp_pulses++;
        #0.1 check(er == 1'b1, "pulse starts with late transition");
        #(T_DLY) check(er == 1'b0, "pulse ended");
        check((width > T_DLY - TOL) && (width < T_DLY + TOL), "pulse width");
        #(10.0 - late - 0.1 - T_DLY) clk = 0;
      end
      check(pulses == exp_pulses, "pulse count");
      #0.1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

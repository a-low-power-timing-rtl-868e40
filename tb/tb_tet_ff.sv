// tb_tet_ff: end-to-end test of the timing-error-tolerant flip-flop with a
// 20 ns clock. Each cycle a random bit reaches `d` either on time (4 ns
// before the rising edge) or late (0.5 to 7 ns after it, in the high half of
// the clock). The reference model is simply "q shows the bit of the current
// cycle": an on-time bit must be on q right after the edge, a late bit within
// 0.2 ns of its arrival (same cycle, no lost clock), and either must then be
// held until the next rising edge. It also checks that exactly one error
// pulse is raised per late transition and none otherwise, and that both the
// normal capture and the correction happened.
`timescale 1ns / 1ps
module tb_tet_ff;
  localparam realtime PERIOD = 20.0;

  logic clk = 1'b0, d, q, qb, er, cm;
  int   checks = 0, failures = 0;
  int   er_pulses = 0, corrections = 0, on_time = 0;

  tet_ff dut (.clk(clk), .d(d), .q(q), .qb(qb), .er(er), .cm(cm));

  always #(PERIOD / 2) clk = ~clk;            // rising edges at 10, 30, ...
  always @(posedge er) er_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (d=%b q=%b er=%b)", what, $realtime, d, q, er);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic    prev, bit_n;
    realtime late;
    bit      is_late;
    int      exp_pulses = 0;
    d = 1'b0;
    // Two warm-up cycles load the initial 0; end 5 ns before a rising edge.
    #45;
    prev = 1'b0;
    for (int n = 0; n < 400; n++) begin
      // now: rising edge - 5 ns
      bit_n   = 1'($urandom);
      is_late = ($urandom % 3) != 0;
      late    = 0.5 + real'($urandom % 650) / 100.0;
      #0.5 check(q == prev, "previous bit held to the edge");
      check(qb == ~prev, "qb complement");
      if (!is_late) begin
        #0.5 d = bit_n;                       // edge - 4 ns
        #4.2 check(q == bit_n, "on-time capture");
        on_time++;
        #(late);                              // edge + late + 0.2, as below
      end else begin
        #4.5;                                 // edge
        #0.1 check(q == prev, "late bit not yet captured");
        #(late - 0.1) d = bit_n;
        if (bit_n != prev) begin
          exp_pulses++;
          corrections++;
        end
        #0.2 check(q == bit_n, "late bit corrected in the same cycle");
      end
      // now: edge + late + 0.2; wait until 0.5 ns before the falling edge
      #(PERIOD / 2 - late - 0.7) check(q == bit_n, "held in the high half");
      check(er_pulses == exp_pulses, "one error pulse per late transition");
      #5.5 check(q == bit_n, "held in the low half");   // next edge - 5 ns
      prev = bit_n;
    end
    check(on_time > 0, "on-time capture exercised");
    check(corrections > 0, "late-data correction exercised");
    $display("on_time=%0d corrections=%0d error_pulses=%0d", on_time, corrections, er_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tet_pipeline: end-to-end test of the two-stage circuit at its default
// parameters, 20 ns clock, delayed clock ck = clk + 3 ns.
//
// The testbench plays the logic between the stages: the bit stage 2 must
// capture at edge n is the stage-1 bit of edge n-1 XOR a random bit, driven
// onto d2 at a chosen arrival time. Every cycle picks, at random, how late
// each stage's data is:
//   stage 1: on time (4 ns before the edge) or late (0.5-6.5 ns after it),
//            which the error-tolerant flip-flop must correct in that cycle;
//   stage 2: on time; borrowed (0.3-2.7 ns after the edge, before ck rises);
//            extended (after ck rises, while stage 1 is correcting a late
//            bit of the same cycle); or missed (after ck rises with no
//            stage-1 error), where stage 2 must keep its old value - the
//            borrow window is finite.
// The reference is computed in the testbench from the chosen bits. Outputs
// are checked right after each late arrival (same-cycle correction), before
// the falling edge and in the low half (hold). Each mechanism - stage-1
// correction, stage-2 borrow, stage-2 extension by a stage-1 error and a
// missed window - is counted, and one that never happens is a failure.
`timescale 1ns / 1ps
module tb_tet_pipeline;
  localparam realtime PERIOD   = 20.0;
  localparam realtime T_BORROW = 3.0;
  localparam int      CYCLES   = 600;

  typedef enum logic [1:0] {S2_ON_TIME, S2_BORROW, S2_EXTEND, S2_MISS} s2_mode_e;

  logic clk = 1'b0, ck, d, d2;
  logic qa, qb, q2, q2b, er, cm, clkdd;
  int   checks = 0, failures = 0;
  int   er_pulses = 0;
  int   n_on_time = 0, n_correct = 0, n_borrow = 0, n_extend = 0, n_miss = 0;

  tet_pipeline dut (
    .clk(clk), .ck(ck), .d(d), .d2(d2),
    .qa(qa), .qb(qb), .q2(q2), .q2b(q2b),
    .er(er), .cm(cm), .clkdd(clkdd)
  );

  always #(PERIOD / 2) clk = ~clk;             // rising edges at 10, 30, ...
  assign #(T_BORROW) ck = clk;
  always @(posedge er) er_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (qa=%b q2=%b er=%b clkdd=%b)", what, $realtime, qa, q2, er, clkdd);
    end
  endtask

  task automatic wait_until(input realtime t);
    if (t > $realtime) #(t - $realtime);
  endtask

  initial begin
    #(PERIOD * (CYCLES + 10));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic     prev1, prev2, b1, v2, exp2, cur_d2;
    bit       late1, need_on_time;
    realtime  edge_t, l1, l2;
    s2_mode_e m2;
    int       exp_pulses = 0;

    d = 1'b0; d2 = 1'b0;
    #45;                                         // two warm-up cycles
    prev1 = 1'b0; prev2 = 1'b0; cur_d2 = 1'b0;
    need_on_time = 1'b0;
    for (int n = 0; n < CYCLES; n++) begin
      edge_t = $realtime + 5.0;
      b1     = 1'($urandom);
      v2     = prev1 ^ 1'($urandom);
      late1  = ($urandom % 2) == 1;
      // Stage-2 arrival mode.
      if (need_on_time)                         m2 = S2_ON_TIME;
      else if (late1 && (b1 != prev1) && ($urandom % 2 == 1)) m2 = S2_EXTEND;
      else if (late1)                           m2 = ($urandom % 2 == 1) ? S2_BORROW : S2_ON_TIME;
      else case ($urandom % 4)
        0:       m2 = S2_ON_TIME;
        1, 2:    m2 = S2_BORROW;
        default: m2 = S2_MISS;
      endcase
      need_on_time = (m2 == S2_MISS);
      // Arrival times after the edge.
      l1 = (m2 == S2_EXTEND) ? 2.6 + real'($urandom % 240) / 100.0
                             : 0.5 + real'($urandom % 600) / 100.0;
      case (m2)
        S2_BORROW: l2 = 0.3 + real'($urandom % 240) / 100.0;
        S2_EXTEND: l2 = l1 + 0.5;
        S2_MISS:   l2 = T_BORROW + 1.5 + real'($urandom % 200) / 100.0;
        default:   l2 = 0.0;
      endcase
      exp2 = (m2 == S2_MISS) ? prev2 : v2;

      // Edge - 4.5 ns: both outputs still hold the previous cycle.
      wait_until(edge_t - 4.5);
      check(qa == prev1 && qb == ~prev1, "stage 1 holds to the edge");
      check(q2 == prev2 && q2b == ~prev2, "stage 2 holds to the edge");
      // Edge - 4 ns: on-time arrivals.
      wait_until(edge_t - 4.0);
      if (!late1) d = b1;
      if (m2 == S2_ON_TIME) begin d2 = v2; cur_d2 = v2; end

      fork
        begin
          if (late1) begin
            wait_until(edge_t + l1);
            d = b1;
            if (b1 != prev1) begin
              exp_pulses++;
              n_correct++;
            end
            #0.2 check(qa == b1, "stage 1 corrects the late bit in the same cycle");
          end else begin
            wait_until(edge_t + 0.2);
            check(qa == b1, "stage 1 on-time capture");
            n_on_time++;
          end
        end
        begin
          if (m2 != S2_ON_TIME) begin
            wait_until(edge_t + l2);
            if (v2 != cur_d2) begin
              case (m2)
                S2_BORROW: n_borrow++;
                S2_EXTEND: n_extend++;
                S2_MISS:   n_miss++;
                default: ;
              endcase
            end
            d2 = v2; cur_d2 = v2;
            #0.2 check(q2 == exp2, "stage 2 after late arrival");
          end else begin
            wait_until(edge_t + 0.2);
            check(q2 == exp2, "stage 2 on-time capture");
          end
        end
      join

      wait_until(edge_t + 9.5);
      check(qa == b1, "stage 1 held in the high half");
      check(q2 == exp2, "stage 2 held in the high half");
      check(er_pulses == exp_pulses, "one error pulse per late stage-1 transition");
      wait_until(edge_t + 15.0);
      check(qa == b1, "stage 1 held in the low half");
      check(q2 == exp2, "stage 2 held in the low half");
      prev1 = b1;
      prev2 = exp2;
    end
    check(n_on_time > 0, "stage-1 on-time capture happened");
    check(n_correct > 0, "stage-1 error correction happened");
    check(n_borrow > 0, "stage-2 time borrow happened");
    check(n_extend > 0, "stage-2 window extension by a stage-1 error happened");
    check(n_miss > 0, "stage-2 arrival past the borrow window happened");
    $display("on_time=%0d corrected=%0d borrowed=%0d extended=%0d missed=%0d error_pulses=%0d",
             n_on_time, n_correct, n_borrow, n_extend, n_miss, er_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

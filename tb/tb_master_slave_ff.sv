// tb_master_slave_ff: self-checking test of the split-clock master-slave
// flip-flop. It first drives the two latch clocks by hand and checks each
// latch's transparent and hold behaviour, including both latches open at
// once (the error-correction case), then runs the cell as a rising-edge
// flip-flop (cm = ~clk, clk1 = clk) on random data and checks that q shows
// each bit from its rising edge until the next one.
`timescale 1ns / 1ps
module tb_master_slave_ff;
  logic d, cm, clk1, q, qb;
  int   checks = 0, failures = 0;

  master_slave_ff dut (.d(d), .cm(cm), .clk1(clk1), .q(q), .qb(qb));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $realtime, got, exp);
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held, bit_n;
    // Load a known 0 through both latches.
    d = 0; cm = 1; clk1 = 1; #1;
    check(q, 0, "both open, d=0");
    check(qb, 1, "qb complement");
    d = 1; #1;
    check(q, 1, "both open, q follows d");
    check(qb, 0, "qb complement");
    // Slave holds while master alone is open.
    clk1 = 0; #1;
    d = 0; #1;
    check(q, 1, "slave holds while clk1 low");
    d = 1; #1; d = 0; #1;
    // Close master, open slave: slave shows master's last value (0).
    cm = 0; #1; clk1 = 1; #1;
    check(q, 0, "slave shows master content");
    d = 1; #1;
    check(q, 0, "master holds while cm low");
    // Reopen master while slave open: late data passes through.
    cm = 1; #1;
    check(q, 1, "reopened master passes d");
    cm = 0; #1; d = 0; #1;
    check(q, 1, "master closed on the late bit");
    clk1 = 0; #1;
    check(q, 1, "both closed holds");

    // Rising-edge flip-flop operation.
    cm = 1; clk1 = 0; #5;
    for (int n = 0; n < 100; n++) begin
      bit_n = 1'($urandom);
      d = bit_n; #4;                 // data settles in the low half
      cm = 0; clk1 = 1;               // rising edge
      #1; d = ~bit_n;                 // data changes after the edge (hold)
      #1; check(q, bit_n, "edge capture");
      check(qb, ~bit_n, "edge capture qb");
      #3; cm = 1; clk1 = 0;           // falling edge
      held = bit_n;
      #4; check(q, held, "hold through low half");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

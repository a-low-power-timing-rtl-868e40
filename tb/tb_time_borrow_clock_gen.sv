// tb_time_borrow_clock_gen: checks the second-stage master clock CLKDD for
// every input combination and for random sequences. The reference: CLKDD is
// high (second master open) while the delayed clock is low, and also while
// the first stage is in an error window, i.e. its master clock is high while
// the system clock is high.
`timescale 1ns / 1ps
module tb_time_borrow_clock_gen;
  logic cm, clk, ck, clkdd;
  int   checks = 0, failures = 0;

  time_borrow_clock_gen dut (.cm(cm), .clk(clk), .ck(ck), .clkdd(clkdd));

  function automatic logic expected(input logic m, input logic c, input logic k);
    if (k == 1'b0) return 1'b1;
    if (m && c)    return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {cm, clk, ck} = 3'(i);
      #1;
      checks++;
      if (clkdd !== expected(cm, clk, ck)) begin
        failures++;
        $display("FAIL cm=%b clk=%b ck=%b clkdd=%b", cm, clk, ck, clkdd);
      end
    end
    for (int i = 0; i < 200; i++) begin
      {cm, clk, ck} = 3'($urandom);
      #1;
      checks++;
      if (clkdd !== expected(cm, clk, ck)) begin
        failures++;
        $display("FAIL cm=%b clk=%b ck=%b clkdd=%b", cm, clk, ck, clkdd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

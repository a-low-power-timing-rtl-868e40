// tb_master_clock_gen: checks the master clock generator against the
// relation it must satisfy - the master clock is the inverted system clock,
// forced high while the error pulse is high - for every input combination
// and then for random input sequences.
`timescale 1ns / 1ps
module tb_master_clock_gen;
  logic clk, er, cm;
  int   checks = 0, failures = 0;

  master_clock_gen dut (.clk(clk), .er(er), .cm(cm));

  function automatic logic expected(input logic c, input logic e);
    // Master latch open when the clock is low or an error is pending.
    if (e) return 1'b1;
    return (c == 1'b0);
  endfunction

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {clk, er} = 2'(i);
      #1;
      checks++;
      if (cm !== expected(clk, er)) begin
        failures++;
        $display("FAIL clk=%b er=%b cm=%b", clk, er, cm);
      end
    end
    for (int i = 0; i < 200; i++) begin
      clk = 1'($urandom);
      er  = 1'($urandom);
      #1;
      checks++;
      if (cm !== expected(clk, er)) begin
        failures++;
        $display("FAIL clk=%b er=%b cm=%b", clk, er, cm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

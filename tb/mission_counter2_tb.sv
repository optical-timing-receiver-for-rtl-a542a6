// Self-checking test of Mission Counter 2: after Mission Clear it reads all
// ones; every carry pulse adds one (random carry patterns, including
// back-to-back pulses); a clear in the middle starts over.
`timescale 1ns / 1ps
module mission_counter2_tb;
  logic clk = 0, rst_n = 0, mcr = 0, carry = 0;
  logic [39:0] count;
  longint exp_cnt;
  int checks = 0, failures = 0;

  mission_counter2 dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      mcr = 1; @(negedge clk); mcr = 0;
      exp_cnt = (longint'(1) << 40) - 1;
      checks++;
      if (count != 40'(exp_cnt)) begin failures++; $display("preset %h", count); end
      for (int i = 0; i < 2000; i++) begin
        carry = 1'($urandom);
        @(negedge clk);
        if (carry) exp_cnt = (exp_cnt + 1) & ((longint'(1) << 40) - 1);
        checks++;
        if (count != 40'(exp_cnt)) begin failures++; if (failures < 5) $display("count %h exp %h", count, exp_cnt); end
      end
      carry = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

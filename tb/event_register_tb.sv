// Self-checking test of the Event Register: random Adder outputs, mission
// bits and stop tags are strobed in; the word must be {tag, Mc13..Mc59 plus
// the signed carry, low 12 bits}. Without a strobe it holds; clear empties it.
`timescale 1ns / 1ps
module event_register_tb;
  logic clk = 0, rst_n = 0, clear = 0, strobe = 0;
  logic [11:0] low_word;
  logic ad13, ad13_borrow, stop_tag;
  logic [46:0] mission_hi;
  logic [59:0] word, exp_word;
  int checks = 0, failures = 0;

  event_register dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cy;
    {low_word, ad13, ad13_borrow, stop_tag, mission_hi} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    exp_word = '0;
    for (int i = 0; i < 3000; i++) begin
      low_word   = 12'($urandom);
      mission_hi = {15'($urandom), 32'($urandom)};
      if (i % 50 == 0) mission_hi = '1;
      if (i % 50 == 1) mission_hi = '0;
      cy = int'($urandom_range(0, 2));
      ad13 = cy == 1; ad13_borrow = cy == 2;
      stop_tag = 1'($urandom);
      strobe = 1'($urandom);
      clear  = ($urandom_range(0, 40) == 0);
      @(negedge clk);
      if (clear) exp_word = '0;
      else if (strobe)
        exp_word = {stop_tag, mission_hi + (cy == 1 ? 47'd1 : 47'd0) - (cy == 2 ? 47'd1 : 47'd0), low_word};
      checks++;
      if (word != exp_word) begin failures++; if (failures < 5) $display("word %h exp %h", word, exp_word); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

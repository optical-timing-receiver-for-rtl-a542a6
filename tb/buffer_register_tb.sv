// Self-checking test of the Buffer Register: random words with random
// strobes and clears; the register must take the word on a strobe, hold it
// otherwise and read zero after a clear.
`timescale 1ns / 1ps
module buffer_register_tb;
  logic clk = 0, rst_n = 0, clear = 0, strobe = 0;
  logic [59:0] d, q, exp_q;
  int checks = 0, failures = 0;

  buffer_register dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    exp_q = '0;
    for (int i = 0; i < 3000; i++) begin
      d = {28'($urandom), 32'($urandom)};
      strobe = 1'($urandom);
      clear  = ($urandom_range(0, 30) == 0);
      @(negedge clk);
      if (clear) exp_q = '0; else if (strobe) exp_q = d;
      checks++;
      if (q != exp_q) begin failures++; if (failures < 5) $display("q %h exp %h", q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

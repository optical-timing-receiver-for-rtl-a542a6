// Self-checking test of the Adder: random fine, coarse and mission bits.
// The expected word is the signed total Mc*1024 + coarse*32 + fine worked
// out in integer arithmetic: its low 12 bits must appear on low_word and
// its quotient by 4096 (+1, 0 or -1) on ad13 / ad13_borrow.
`timescale 1ns / 1ps
module adder_tb;
  logic [6:0] fine, coarse;
  logic [1:0] mc_low;
  logic [11:0] low_word;
  logic ad13, ad13_borrow;
  int checks = 0, failures = 0;

  adder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, exp_low, exp_carry, fs, cs;
    for (int i = 0; i < 4000; i++) begin
      if (i < 16384 && i < 2000) begin
        fine = 7'($urandom); coarse = 7'($urandom); mc_low = 2'($urandom);
      end else begin
        fine = 7'(i); coarse = 7'(i * 37); mc_low = 2'(i >> 7);
      end
      #1;
      fs = fine[6] ? int'(fine) - 128 : int'(fine);
      cs = coarse[6] ? int'(coarse) - 128 : int'(coarse);
      total = int'(mc_low) * 1024 + cs * 32 + fs;
      exp_low = total & 4095;
      exp_carry = (total - exp_low) / 4096;
      checks++;
      if (int'(low_word) != exp_low || int'(ad13) != (exp_carry == 1) ||
          int'(ad13_borrow) != (exp_carry == -1)) begin
        failures++;
        if (failures < 10)
          $display("mismatch f=%0d c=%0d m=%0d: low %0d/%0d carry %0d%0d/%0d",
                   fs, cs, mc_low, low_word, exp_low, ad13, ad13_borrow, exp_carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the LED displays: for random buffer words, group
// settings and display switches, lamp k of each panel must show the buffer
// bit the panel legend assigns to it (D1-D16; D17-D32, D33-D48 or D49-D60).
`timescale 1ns / 1ps
module led_display_tb;
  import sbet_pkg::*;
  logic [59:0] br;
  logic display1_on, display2_on;
  group_sw_e group;
  logic [15:0] led1, led2;
  int checks = 0, failures = 0;

  led_display dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first, bitno;
    logic e1, e2;
    for (int i = 0; i < 2000; i++) begin
      br = {28'($urandom), 32'($urandom)};
      display1_on = 1'($urandom); display2_on = 1'($urandom);
      group = group_sw_e'($urandom_range(0, 2));
      #1;
      first = group == GROUP_A ? 17 : group == GROUP_B ? 33 : 49;
      for (int k = 1; k <= 16; k++) begin
        e1 = display1_on && br[k-1];
        bitno = first + k - 1;
        e2 = display2_on && bitno <= 60 && br[bitno-1];
        checks++;
        if (led1[k-1] != e1 || led2[k-1] != e2) begin
          failures++;
          if (failures < 5) $display("lamp %0d group %0d: %b%b exp %b%b", k, group, led1[k-1], led2[k-1], e1, e2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// LED displays of the Logic 1 and Logic 2 modules.
//
// Logic 1 shows the lowest 16 bits of the Buffer Register. Logic 2 shows 16
// more, chosen by the Group Display switch: A = D17-D32, B = D33-D48,
// C = D49-D59 with the stop tag D60 on the twelfth lamp (the upper four
// lamps stay dark). Each module's display switch blanks its lamps without
// affecting the digitizer. The groups follow the document; the encoding of
// the switch is this design's.
//
// Timing: combinational.
`timescale 1ns / 1ps
module led_display (
  input  logic [59:0]      br,
  input  logic             display1_on,
  input  logic             display2_on,
  input  sbet_pkg::group_sw_e group,
  output logic [15:0]      led1,
  output logic [15:0]      led2
);
  import sbet_pkg::*;

  logic [15:0] sel;
  always_comb begin
    unique case (group)
      GROUP_A: sel = br[31:16];
      GROUP_B: sel = br[47:32];
      GROUP_C: sel = {4'b0, br[59:48]};
      default: sel = '0;
    endcase
  end

  assign led1 = display1_on ? br[15:0] : '0;
  assign led2 = display2_on ? sel : '0;
endmodule

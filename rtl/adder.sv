// Adder of the Logic 1 module: assembles the low 12 bits of the event word.
//
// Bits 1-5 of the word are the fine count's bits Fc1-Fc5 unchanged. Bits
// 6-12 are the sum of Fc6-Fc7, the inverted coarse count Cc6-Cc12 and the
// mission count bits Mc11-Mc12; the carry out (Ad13) goes to Event Register 2,
// which holds Mc13 upwards. This arrangement follows the document.
//
// This design's choice: the coarse term (N_be - N_lo) and the fine term
// (N_op - N_ef - 1) are differences and can be negative, which seven
// unsigned bits cannot show. Here both are read as two's-complement numbers
// (their magnitude stays below 50 counts) and sign-extended, so the
// carry into bit 13 is +1, 0 or -1 (ad13 or ad13_borrow). Without this a
// negative coarse difference would add 4 clock periods to the result.
//
// Timing: purely combinational.
`timescale 1ns / 1ps
module adder (
  input  logic [6:0]  fine,         // Fc1-Fc7
  input  logic [6:0]  coarse,       // Cc6-Cc12 (already inverted)
  input  logic [1:0]  mc_low,       // Mc11-Mc12
  output logic [11:0] low_word,     // event bits 1-12
  output logic        ad13,         // carry into bit 13
  output logic        ad13_borrow   // borrow from bit 13
);
  logic signed [9:0] sum;

  always_comb begin
    sum = 10'(signed'(fine[6:5])) + 10'(signed'(coarse)) + 10'({mc_low, 5'b0});
    low_word    = {sum[6:0], fine[4:0]};
    ad13        = sum[8:7] == 2'b01;
    ad13_borrow = sum[9];
  end
endmodule

// Event Register (ER1 and ER2): first storage stage of a digitized event.
//
// At the Auxiliary Counter strobe ER1 takes bits 1-12 from the Adder and ER2
// takes the mission count bits Mc13-Mc59 with the Adder's carry added (gate
// G7 in the document clocks ER2 once more when Ad13 is set) and the stop tag
// as bit 60. Mission Clear and the Logic 3 clear (C.S2) empty it. The word
// layout follows the document; the borrow input belongs to this design's
// signed Adder.
//
// Timing: loads on the clock in which strobe is high.
`timescale 1ns / 1ps
module event_register (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        strobe,
  input  logic [11:0] low_word,     // from the Adder
  input  logic        ad13,
  input  logic        ad13_borrow,
  input  logic [46:0] mission_hi,   // Mc13-Mc59
  input  logic        stop_tag,
  output logic [59:0] word
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear) word <= '0;
    else if (strobe)
      word <= {stop_tag,
               mission_hi + 47'(ad13) - 47'(ad13_borrow),
               low_word};
  end
endmodule

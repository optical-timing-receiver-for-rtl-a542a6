// Buffer Register (BR1 and BR2): second storage stage of a digitized event.
//
// Holds the 60-bit word D1-D60 for the LED displays and for reading over the
// CAMAC dataway while the Event Register already processes the next event.
// The Logic 3 module strobes it when the Event Register holds an event and
// the buffer has been released (LAM latch clear). The document gives its
// function; the clear input (C.S2 clears the buffer in the document's
// command list) is this design's way of emptying it.
//
// Timing: loads on the clock in which strobe is high; clear wins.
`timescale 1ns / 1ps
module buffer_register (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        strobe,
  input  logic [sbet_pkg::WORD_W-1:0] d,
  output logic [sbet_pkg::WORD_W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= '0;
    else if (strobe)     q <= d;
  end
endmodule

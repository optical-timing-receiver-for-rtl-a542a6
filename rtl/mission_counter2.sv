// Mission Counter 2 (MC2) of the Logic 2 module: bits M20-M59.
//
// The upper 40 bits of the 49-bit mission count of 20 ns clock periods. It
// advances by one on every carry from Mission Counter 1 (binary 19 going
// from one to zero). Mission Clear presets it to all ones, as the document's
// diagram prints it, so that the whole mission counter starts at -1 and the
// 256 counts added during the mission-start event bring it to 255.
//
// Timing: one increment per clock in which carry is high.
`timescale 1ns / 1ps
module mission_counter2 #(
  parameter int unsigned W = sbet_pkg::MISSION_W - sbet_pkg::AUX_W - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mcr,
  input  logic         carry,
  output logic [W-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n || mcr) count <= '1;
    else if (carry)    count <= count + 1'b1;
  end
endmodule

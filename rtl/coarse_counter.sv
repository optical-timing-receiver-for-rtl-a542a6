// "Coarse" Counter (CC) and "Coarse" Register (CR) of the Logic 1 module.
//
// The coarse train of an event carries N clock pulses, one per clock period
// of the coarse stretcher's discharge (the sub-clock fraction expanded 32
// times). The 7-bit counter's output is inverted on its way to the Adder
// (bits Cc6-Cc12) and to the register. At the first Auxiliary Counter strobe
// of a mission the register takes that inverted value, the complement of the
// mission start's count N_be, and keeps it for the whole mission. Every Event
// Clear loads the register back into the counter, so the next event's N_lo
// pulses are counted on top of ~N_be and the Adder receives
// ~(~N_be + N_lo) = N_be - N_lo (mod 128): the subtraction of the document's
// Eq. 7 is done by counting. Widths and the data path follow the document;
// Mission Clear clearing both to zero is this design's choice.
//
// Timing: counts once per clock with train high; reg_strobe and load are
// one-clock pulses; mcr wins, then load, then counting.
`timescale 1ns / 1ps
module coarse_counter #(
  parameter int unsigned W = sbet_pkg::INTERP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mcr,         // Mission Clear
  input  logic         train,       // coarse train from the Control Logic
  input  logic         reg_strobe,  // CR strobe from the Auxiliary Counter
  input  logic         load,        // strobe from the interface logic (Event Clear)
  output logic [W-1:0] to_adder,    // inverted counter, Cc6-Cc12
  output logic [W-1:0] cr_reg
);
  logic [W-1:0] cc;

  assign to_adder = ~cc;   // INVERTER

  always_ff @(posedge clk) begin
    if (!rst_n || mcr) begin
      cc     <= '0;
      cr_reg <= '0;
    end else begin
      if (reg_strobe) cr_reg <= ~cc;
      if (load)       cc <= cr_reg;
      else if (train) cc <= cc + 1'b1;
    end
  end
endmodule

// "Fine" Counter (FC) and "Fine" Register (FR) of the Logic 1 module.
//
// The fine train of an event carries one pulse per clock period of the fine
// stretcher's discharge (the coarse residue expanded another 32 times). At
// the first Auxiliary Counter strobe of a mission the register takes the
// counter as it is, the mission start's count N_ef. Every Event Clear loads
// the complement of the register into the counter, so the next event's N_op
// pulses are counted on top of ~N_ef and the Adder receives
// N_op - N_ef - 1 (mod 128) on bits Fc1-Fc7. Widths and the data path (the
// inverter sits between register and counter) follow the document; Mission
// Clear clearing both to zero is this design's choice.
//
// Timing: counts once per clock with train high; reg_strobe and load are
// one-clock pulses; mcr wins, then load, then counting.
`timescale 1ns / 1ps
module fine_counter #(
  parameter int unsigned W = sbet_pkg::INTERP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mcr,
  input  logic         train,       // fine train from the Control Logic
  input  logic         reg_strobe,  // FR strobe from the Auxiliary Counter
  input  logic         load,        // Event Clear
  output logic [W-1:0] to_adder,    // Fc1-Fc7
  output logic [W-1:0] fr_reg
);
  logic [W-1:0] fc;

  assign to_adder = fc;

  always_ff @(posedge clk) begin
    if (!rst_n || mcr) begin
      fc     <= '0;
      fr_reg <= '0;
    end else begin
      if (reg_strobe) fr_reg <= fc;
      if (load)       fc <= ~fr_reg;   // INVERTER
      else if (train) fc <= fc + 1'b1;
    end
  end
endmodule

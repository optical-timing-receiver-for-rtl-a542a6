// Range Counter and Enable Counter of the Logic 1 module.
//
// Before a laser shot the host loads the expected echo delay into the 24-bit
// Range Counter (F(16)A(0)S2) and the stop aperture into the 12-bit Enable
// Counter (F(16)A(1)S2); both values are also kept in the RC/EC Register
// (which F(16)A(0)S1 / F(16)A(1)S1 load alone). When the start event's T1
// sets the Range Latch, clock pulses (count_en) count the Range Counter down;
// at zero they are diverted to the Enable Counter and STOP ENABLED (and the
// front-panel GATE OUT) is high until that counter also reaches zero. Then
// EC Clear resets the Range Latch and, so that the same aperture repeats
// when the host has not loaded new values, both counters are reloaded from
// the RC/EC Register. Widths (24 and 12 bits, 20 ns steps) and this sequence
// follow the document; the exact reload moment (at the end of the aperture)
// is this design's choice.
//
// Timing: one count per clock in which count_en is high. With range R and
// enable E the aperture opens R clocks after count_en rises and lasts E
// clocks. A load has priority over counting.
`timescale 1ns / 1ps
module range_enable_counter #(
  parameter int unsigned RANGE_W  = sbet_pkg::RANGE_W,
  parameter int unsigned ENABLE_W = sbet_pkg::ENABLE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [RANGE_W-1:0]  w,
  input  logic                load_rc_reg,   // F(16)A(0)S1
  input  logic                load_ec_reg,   // F(16)A(1)S1
  input  logic                load_range,    // F(16)A(0)S2
  input  logic                load_enable,   // F(16)A(1)S2
  input  logic                count_en,      // clock from the Range Latch
  output logic                stop_enabled,  // G4, also GATE OUT
  output logic                ec_clear       // EC done, one clock
);
  logic [RANGE_W-1:0]  rc, rc_reg;
  logic [ENABLE_W-1:0] ec, ec_reg;
  logic rc_done;

  assign rc_done      = rc == '0;
  assign stop_enabled = count_en && rc_done && ec != '0;
  assign ec_clear     = count_en && rc_done && ec <= ENABLE_W'(1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rc <= '0; ec <= '0; rc_reg <= '0; ec_reg <= '0;
    end else begin
      if (load_rc_reg || load_range) rc_reg <= w;
      if (load_ec_reg || load_enable) ec_reg <= w[ENABLE_W-1:0];
      if (load_range)       rc <= w;
      else if (ec_clear)    rc <= rc_reg;
      else if (count_en && !rc_done) rc <= rc - 1'b1;
      if (load_enable)      ec <= w[ENABLE_W-1:0];
      else if (ec_clear)    ec <= ec_reg;
      else if (count_en && rc_done) ec <= ec - 1'b1;
    end
  end
endmodule

// Auxiliary Counter (AC) and Mission Counter 1 (MC1, bits Mc11-Mc19).
//
// The mission train (one pulse per 20 ns clock from the mission start on) is
// never interrupted, but while an event is being processed it is steered
// into the 8-bit Auxiliary Counter instead of the mission counter, so that
// the mission count stays frozen at the event's T1 and can be read. The
// Auxiliary Counter Start pulse switches the train over; after 256 pulses
// (5.12 us) it is switched back and Mission Counter Ready (IL) is sent to the
// Logic 3 module. At the 128th pulse the strobe loads the Event Register,
// sets the Strobe Latch (whose first setting in a mission strobes the Coarse
// and Fine Registers) and adds the 256 missing pulses to binary 19, so no
// mission count is lost. MC1 is the same size as the AC; its overflow also
// advances binary 19, whose overflow is the carry to Mission Counter 2.
// Mission Clear presets both counters to all ones. This follows the
// document's text and diagram.
//
// Timing: counts once per clock with mission_train high. er_strobe and
// mc_ready are one-clock pulses in the clock after the 128th and the 256th
// auxiliary count. This design's choice: the switch-over starts on the
// rising edge of aux_start.
`timescale 1ns / 1ps
module aux_mission_counter #(
  parameter int unsigned W = sbet_pkg::AUX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mcr,
  input  logic         mission_train,
  input  logic         aux_start,
  output logic [W-1:0] mc1,           // Mc11-Mc18
  output logic         mc19,
  output logic         carry_mc2,     // to Mission Counter 2
  output logic         er_strobe,     // strobe to Event Register
  output logic         reg_strobe,    // CR / FR strobe (first of a mission)
  output logic         strobe_latch,
  output logic         mc_ready,      // Mission Counter Ready (IL)
  output logic         aux_active     // train steered into the AC
);
  localparam logic [W-1:0] HALF = W'((1 << (W - 1)) - 1);  // value after 128th count
  localparam logic [W-1:0] FULL = '1;                      // value after 256th count

  logic [W-1:0] ac;
  logic aux_start_q;
  logic ac_count, mc_count, hi_inc;

  assign ac_count   = aux_active && mission_train;
  assign mc_count   = !aux_active && mission_train;
  assign hi_inc     = er_strobe || (mc_count && mc1 == '1);    // G5
  assign carry_mc2  = hi_inc && mc19;
  assign reg_strobe = er_strobe && !strobe_latch;

  always_ff @(posedge clk) begin
    if (!rst_n || mcr) begin
      ac           <= '1;
      mc1          <= '1;
      mc19         <= 1'b1;
      aux_active   <= 1'b0;
      aux_start_q  <= 1'b0;
      er_strobe    <= 1'b0;
      mc_ready     <= 1'b0;
      strobe_latch <= 1'b0;
    end else begin
      aux_start_q <= aux_start;
      er_strobe   <= ac_count && ac == HALF - 1'b1;
      mc_ready    <= ac_count && ac == FULL - 1'b1;
      if (aux_start && !aux_start_q)            aux_active <= 1'b1;
      else if (ac_count && ac == FULL - 1'b1)   aux_active <= 1'b0;
      if (ac_count) ac  <= ac + 1'b1;
      if (mc_count) mc1 <= mc1 + 1'b1;
      if (hi_inc)   mc19 <= ~mc19;
      if (er_strobe) strobe_latch <= 1'b1;
    end
  end
endmodule

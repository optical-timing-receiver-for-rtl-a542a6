// Control Logic of the Logic 1 module.
//
// Turns the three interpolator pulses into counter gates. T1 (second clock
// after the event) sets the Mission Latch on the first event after a Mission
// Clear, which starts the uninterrupted mission train; it also sets the
// "Coarse" Latch (coarse train on), the Range Latch (clock to the Range and
// Enable Counters) and, until T2, gives the Auxiliary Counter Start. T2 sets
// the "Fine" Latch: the coarse train stops and the fine train starts. T3 sets
// the End-of-Conversion Latch and its trailing edge stops the fine train.
// After the first T1 ends, the Event Enable Latch marks every later T1 as an
// Event Busy (an event other than the mission start). Event Clear (CR) resets
// the coarse, fine and end-of-conversion latches, Mission Clear (MCR) the
// mission and event-enable latches, and EC Clear the Range Latch. The latch
// set and reset terms follow the Control Logic diagram.
//
// Timing: the latches are clocked set/reset flip-flops (reset wins); the
// trains are clock enables for the counters, so a train that is on in a
// cycle advances its counter at the next edge. T1 and T2 change just after a
// clock edge; T3 falls at an arbitrary time and is used directly to end the
// fine train, so the fine count is the number of clocks up to T3's fall less
// a constant that cancels between events. The Range Latch is set on the
// rising edge of T1 (this design's choice, so that it is not set again while
// a T1 outlives the EC Clear). ENABLE is the unnamed input of gate G1.
`timescale 1ns / 1ps
module control_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic t1,
  input  logic t2,
  input  logic t3,
  input  logic mcr,          // Mission Clear
  input  logic cr,           // Event Clear
  input  logic ec_clear,     // from the Enable Counter
  output logic mission_latch,
  output logic event_enable,
  output logic event_busy,
  output logic mission_train,
  output logic range_clock,
  output logic sbet_busy,
  output logic coarse_train,
  output logic fine_train,
  output logic aux_start
);
  logic g1, g1_q;
  logic range_latch, coarse_latch, fine_latch, eoc_latch;

  assign g1 = enable && t1;

  always_ff @(posedge clk) begin
    if (!rst_n || mcr) begin
      mission_latch <= 1'b0;
      event_enable  <= 1'b0;
    end else begin
      if (g1)                    mission_latch <= 1'b1;
      if (mission_latch && !g1)  event_enable  <= 1'b1;   // G2: end of first T1
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) g1_q <= 1'b0;
    else        g1_q <= g1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || ec_clear || mcr) range_latch <= 1'b0;
    else if (g1 && !g1_q)          range_latch <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || cr || mcr) begin
      coarse_latch <= 1'b0;
      fine_latch   <= 1'b0;
      eoc_latch    <= 1'b0;
    end else begin
      if (g1)               coarse_latch <= 1'b1;
      if (t2 && !eoc_latch) fine_latch   <= 1'b1;        // G8
      if (t3)               eoc_latch    <= 1'b1;
    end
  end

  assign event_busy    = g1 && event_enable;                       // G3
  assign mission_train = mission_latch;                            // G4
  assign range_clock   = range_latch;                              // G5
  assign sbet_busy     = coarse_latch;
  assign coarse_train  = coarse_latch && !fine_latch;              // G6
  assign aux_start     = g1 && !fine_latch;                        // G7
  assign fine_train    = fine_latch && !(eoc_latch && !t3);        // G9, G10
endmodule

// Input and command logic of the Tandem Stretcher module.
//
// Three front-panel event inputs can set the Busy Latch, which starts the
// analog tandem interpolation:
//   Mission Start: (input OR CAMAC mission start) AND (Logic Mission Enable
//                  OR F(25)A(0)) AND (Mission Enable input OR Logic ME on/off)
//   Event Start:   input AND Logic Start Enable AND (Start Gate OR Logic STG)
//   Event Stop:    input AND Logic Stop Enable  AND (Stop Gate  OR Logic SPG)
// The three terms are ORed into the Busy Latch; while it is set no further
// event is accepted. Event Clear (CR) from the Logic 3 module resets it. The
// gate structure, the "Power On" latch and the commands F(24)A(0)S1 (power
// off), F(25)A(0)S1 (start mission), F(26)A(0)S1 and Z.S1 (power on) and
// F(27)A(0) (test power) follow the module's block diagram.
//
// Timing: the Busy Latch is set asynchronously by the accepting gate so that
// the analog interpolator sees the event edge itself; it is cleared on the
// clock by CR. This design's choices: with the Power On latch reset (stand-by)
// no event is accepted; X = 1 for the four decoded commands, Q = X except for
// F(27)A(0), where Q is the Power On status; CAMAC inputs are sampled on clk.
`timescale 1ns / 1ps
module stretcher_control (
  input  logic       clk,
  input  logic       rst_n,
  // front panel
  input  logic       mission_start_in,
  input  logic       mission_enable_in,
  input  logic       event_start_in,
  input  logic       start_gate_in,
  input  logic       event_stop_in,
  input  logic       stop_gate_in,
  output logic       busy_out,
  // rear-panel lines from the Logic 3 module
  input  logic       logic_mission_enable,
  input  logic       logic_me_onoff,
  input  logic       logic_start_enable,
  input  logic       logic_stg_onoff,
  input  logic       logic_stop_enable,
  input  logic       logic_spg,
  input  logic       event_clear,
  // CAMAC
  input  logic       n_sel,
  input  logic [4:0] f,
  input  logic [3:0] a,
  input  logic       s1,
  input  logic       z,
  output logic       x,
  output logic       q,
  // to the analog interpolator
  output logic       busy,
  output logic       power_on
);
  import sbet_pkg::*;

  logic f24, f25, f26, f27;
  assign f24 = n_sel && a == 4'd0 && f == F_DISABLE;
  assign f25 = n_sel && a == 4'd0 && f == F_START;
  assign f26 = n_sel && a == 4'd0 && f == F_ENABLE;
  assign f27 = n_sel && a == 4'd0 && f == F_TEST;

  // "Power On" latch (G21)
  always_ff @(posedge clk) begin
    if (!rst_n)                       power_on <= 1'b1;
    else if ((f26 && s1) || (z && s1)) power_on <= 1'b1;
    else if (f24 && s1)               power_on <= 1'b0;
  end

  assign x = f24 || f25 || f26 || f27;            // G22
  assign q = x && (!f27 || power_on);             // G23, G24

  // acceptance gates G1..G10
  logic g_mission, g_start, g_stop, accept;
  assign g_mission = (mission_start_in || (f25 && s1))          // G1, G2
                  && (logic_mission_enable || f25)               // G3
                  && (mission_enable_in || logic_me_onoff);      // G4
  assign g_start   = event_start_in && logic_start_enable
                  && (start_gate_in || logic_stg_onoff);         // G6, G7
  assign g_stop    = event_stop_in && logic_stop_enable
                  && (stop_gate_in || logic_spg);                // G9, G10
  assign accept    = (g_mission || g_start || g_stop) && power_on; // G8

  // Busy Latch: asynchronous set by the accepted event, clocked clear by CR
  always_ff @(posedge clk or posedge accept) begin
    if (accept)                     busy <= 1'b1;
    else if (!rst_n || event_clear) busy <= 1'b0;
  end

  assign busy_out = busy;
endmodule

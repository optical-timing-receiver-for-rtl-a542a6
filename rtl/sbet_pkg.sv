// Shared constants and types of the event-timing digitizer.
//
// The event word is 60 bits: bits 1-10 (here [9:0]) are the interpolated
// fraction of a clock period in T0/1024 steps (19.53 ps at 50 MHz), bits
// 11-59 ([58:10]) the 49-bit mission count of 20 ns clock periods, and bit 60
// ([59]) the stop tag. The coarse and fine interpolator counters are 7 bits
// each (Cc6-Cc12, Fc1-Fc7) and each interpolation stage expands by 32.
// CAMAC dataway function codes used by the modules are listed as an enum.
`timescale 1ns / 1ps
package sbet_pkg;
  localparam int unsigned WORD_W    = 60;  // 59 time bits + stop tag
  localparam int unsigned MISSION_W = 49;  // Mc11 .. Mc59
  localparam int unsigned INTERP_W  = 7;   // coarse / fine counter width
  localparam int unsigned AUX_W     = 8;   // Auxiliary Counter and MC1 width
  localparam int unsigned RANGE_W   = 24;  // Range Counter (W1-W24)
  localparam int unsigned ENABLE_W  = 12;  // Enable Counter (W1-W12)

  // CAMAC function codes decoded somewhere in the digitizer
  typedef enum logic [4:0] {
    F_READ0  = 5'd0,
    F_READ2  = 5'd2,
    F_TESTL  = 5'd8,
    F_CLRL   = 5'd10,
    F_WRITE  = 5'd16,
    F_DISABLE= 5'd24,
    F_START  = 5'd25,
    F_ENABLE = 5'd26,
    F_TEST   = 5'd27
  } camac_f_e;

  // Rear-panel mode switch of the Logic 3 module
  typedef enum logic [1:0] {
    MODE_NEUTRAL = 2'd0,
    MODE_ENA     = 2'd1,
    MODE_TEST    = 2'd2
  } mode_sw_e;

  // Group Display switch of the Logic 2 module
  typedef enum logic [1:0] {
    GROUP_A = 2'd0,   // D17-D32
    GROUP_B = 2'd1,   // D33-D48
    GROUP_C = 2'd2    // D49-D59 and stop tag D60
  } group_sw_e;
endpackage

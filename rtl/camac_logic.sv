// CAMAC Logic and Command Memory of the Logic 3 module.
//
// Decodes the dataway commands addressed to the Logic 3 station and keeps
// them in latches that drive the rest of the digitizer:
//   F(0)/F(2) A(0..3)  read D1-D16, D17-D32, D33-D48, D49-D60 on R1-R16
//   F(2)A(3)S2, F(10)A(0)S2  clear the LAM latch (release the buffer)
//   F(2)A(7)S2, Z.S2    Mission Clear (MCR)
//   F(8)A(0)            test LAM (Q = LAM latch AND LAM Enable)
//   F(16)A(0/1)S1 / S2  load the RC/EC Register / the Range or Enable Counter
//   F(24)/F(26) A(0)S2  LAM Enable latch off / on
//   F(24)/F(26) A(1..7)S1  Time Readout, Mission Gate Enable, Mission Enable,
//                       Start Gate, Event Start, Stop Gate, Event Stop latches
//   C.S2                clear LAM, the stretcher and the Event and Buffer
//                       Registers without touching the mission count
// The Mission Enable, Event Start and Event Stop latches accept one pulse:
// the first is reset when the mission starts, the other two by Event Clear.
// The MISSION CLEAR connector clears the mission and, like C.S2, the LAM
// latch and the Event and Buffer Registers.
// The "gate" latches drive their lines inverted ("activate" = gate input
// needed). STOP ENABLED from the Enable Counter also enables the stop input
// and marks an event accepted in that aperture with the stop tag.
//
// Event hand-off: Mission Counter Ready sets the Event Register latch; when
// the buffer is free (LAM latch clear, front-panel BUFFER CLEAR released) the
// Buffer Register is strobed and the LAM latch set, and one clock later the
// Event Clear pulse (CLEAR T1, STROBE CC, STROBE FC) frees the Event Register
// and the interpolator. The rear-panel switch selects ENA (Mission Start
// input always enabled) or TEST (the same, and a Mission Clear follows every
// event that is not a mission start: a stop watch).
//
// The commands and latches follow the document's command list and diagram.
// This design's choices: dataway strobes S1/S2 are one-clock pulses
// synchronous to clk; X and Q are active high (X = 1 for every decoded
// command, Q = 1 except for F(8)A(0), where it is the LAM status); MCR is
// registered, so it comes one clock after its cause; the stop tag is set when
// the stretcher's Busy rises while STOP ENABLED is high; the Time Readout
// latch enables the Mission Start input as the command list says.
`timescale 1ns / 1ps
module camac_logic (
  input  logic        clk,
  input  logic        rst_n,
  // dataway
  input  logic        n_sel,
  input  logic [4:0]  f,
  input  logic [3:0]  a,
  input  logic        s1,
  input  logic        s2,
  input  logic        z,
  input  logic        c,
  output logic [15:0] r,
  output logic        x,
  output logic        q,
  output logic        lam,
  // manual and rear-panel controls
  input  sbet_pkg::mode_sw_e mode,
  input  logic        manual_buffer_clear,  // front-panel push button held
  input  logic        ext_clear,            // EXT. CLEAR: buffer only
  input  logic        auto_buffer_clear,    // shorted test pins
  input  logic        ext_mission_clear,    // MISSION CLEAR connector
  // status from the other modules
  input  logic [59:0] br,
  input  logic        mission_latch,
  input  logic        event_busy,
  input  logic        stretcher_busy,
  input  logic        mc_ready,             // IL from the Auxiliary Counter
  input  logic        stop_enabled,
  // control to the other modules
  output logic        mcr,
  output logic        event_clear,
  output logic        clear_regs,           // C.S2 or MISSION CLEAR: Event and Buffer Registers
  output logic        buffer_strobe,
  output logic        load_rc_reg,
  output logic        load_ec_reg,
  output logic        load_range,
  output logic        load_enable,
  output logic        logic_me_onoff,
  output logic        logic_mission_enable,
  output logic        logic_stg_onoff,
  output logic        logic_start_enable,
  output logic        logic_spg,
  output logic        logic_stop_enable,
  output logic        stop_tag,
  output logic        event_ready_led,
  output logic        buffer_ready_led
);
  import sbet_pkg::*;

  // ---- decoding
  logic f_read, f24, f26, f16;
  assign f_read = n_sel && (f == F_READ0 || f == F_READ2) && a <= 4'd3;
  assign f24    = n_sel && f == F_DISABLE && a <= 4'd7;
  assign f26    = n_sel && f == F_ENABLE  && a <= 4'd7;
  assign f16    = n_sel && f == F_WRITE   && a <= 4'd1;

  logic test_lam, clr_lam_cmd, mcr_cmd, c_clear;
  assign test_lam    = n_sel && f == F_TESTL && a == 4'd0;
  assign clr_lam_cmd = s2 && n_sel && ((f == F_READ2 && a == 4'd3) || (f == F_CLRL && a == 4'd0));
  assign mcr_cmd     = (s2 && n_sel && f == F_READ2 && a == 4'd7) || (z && s2);
  assign c_clear     = c && s2;

  assign x = f_read || f24 || f26 || f16 || test_lam ||
             (n_sel && f == F_CLRL && a == 4'd0) || (n_sel && f == F_READ2 && a == 4'd7);

  assign load_rc_reg = f16 && a == 4'd0 && s1;
  assign load_ec_reg = f16 && a == 4'd1 && s1;
  assign load_range  = f16 && a == 4'd0 && s2;
  assign load_enable = f16 && a == 4'd1 && s2;

  function automatic logic cmd(input logic fx, input logic [3:0] ax, input logic [3:0] av,
                               input logic sx);
    return fx && ax == av && sx;
  endfunction

  // ---- command latches
  logic lam_enable, time_readout, mission_gate, mission_en, start_gate, start_en;
  logic stop_gate, stop_en, lam_latch, event_latch, tag, event_seen;
  logic mission_latch_q, busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mission_latch_q <= 1'b0;
      busy_q          <= 1'b0;
    end else begin
      mission_latch_q <= mission_latch;
      busy_q          <= stretcher_busy;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lam_enable <= 1'b0; time_readout <= 1'b0; mission_gate <= 1'b0;
      mission_en <= 1'b0; start_gate <= 1'b0; start_en <= 1'b0;
      stop_gate  <= 1'b0; stop_en <= 1'b0;
    end else begin
      if (cmd(f24, a, 4'd0, s2)) lam_enable <= 1'b0;
      else if (cmd(f26, a, 4'd0, s2)) lam_enable <= 1'b1;

      if (cmd(f24, a, 4'd1, s1) || mcr || event_clear) time_readout <= 1'b0;
      else if (cmd(f26, a, 4'd1, s1)) time_readout <= 1'b1;

      if (cmd(f26, a, 4'd2, s1) || mcr) mission_gate <= 1'b0;
      else if (cmd(f24, a, 4'd2, s1))   mission_gate <= 1'b1;

      if (cmd(f24, a, 4'd3, s1) || mcr || (mission_latch && !mission_latch_q)) mission_en <= 1'b0;
      else if (cmd(f26, a, 4'd3, s1)) mission_en <= 1'b1;

      if (cmd(f26, a, 4'd4, s1) || mcr) start_gate <= 1'b0;
      else if (cmd(f24, a, 4'd4, s1))   start_gate <= 1'b1;

      if (cmd(f24, a, 4'd5, s1) || mcr || event_clear) start_en <= 1'b0;
      else if (cmd(f26, a, 4'd5, s1)) start_en <= 1'b1;

      if (cmd(f26, a, 4'd6, s1) || mcr) stop_gate <= 1'b0;
      else if (cmd(f24, a, 4'd6, s1))   stop_gate <= 1'b1;

      if (cmd(f24, a, 4'd7, s1) || mcr || event_clear) stop_en <= 1'b0;
      else if (cmd(f26, a, 4'd7, s1)) stop_en <= 1'b1;
    end
  end

  assign logic_me_onoff       = !mission_gate;
  assign logic_mission_enable = mission_en || time_readout || mode != MODE_NEUTRAL;
  assign logic_stg_onoff      = !start_gate;
  assign logic_start_enable   = start_en;
  assign logic_spg            = !stop_gate;
  assign logic_stop_enable    = stop_en || stop_enabled;

  // ---- event hand-off
  logic buffer_release;
  assign buffer_release = clr_lam_cmd || ext_clear || auto_buffer_clear || manual_buffer_clear ||
                          c_clear || ext_mission_clear;
  assign buffer_strobe  = event_latch && !lam_latch && !manual_buffer_clear && !event_clear;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      event_latch <= 1'b0;
      lam_latch   <= 1'b0;
      event_clear <= 1'b0;
      tag         <= 1'b0;
      event_seen  <= 1'b0;
      mcr         <= 1'b0;
    end else begin
      event_clear <= buffer_strobe || c_clear;

      if (mcr || event_clear)  event_latch <= 1'b0;
      else if (mc_ready)       event_latch <= 1'b1;

      if (buffer_release)      lam_latch <= 1'b0;
      else if (buffer_strobe)  lam_latch <= 1'b1;

      if (event_clear || mcr)  tag <= 1'b0;
      else if (stretcher_busy && !busy_q && stop_enabled) tag <= 1'b1;

      if (event_clear || mcr)  event_seen <= 1'b0;
      else if (event_busy)     event_seen <= 1'b1;

      mcr <= mcr_cmd || ext_mission_clear ||
             (mode == MODE_TEST && event_clear && event_seen);
    end
  end

  assign clear_regs       = c_clear || ext_mission_clear;
  assign stop_tag         = tag;
  assign event_ready_led  = event_latch;
  assign buffer_ready_led = lam_latch;
  assign lam              = lam_latch && lam_enable;

  // ---- dataway read and response
  always_comb begin
    r = '0;
    if (f_read) begin
      unique case (a[1:0])
        2'd0: r = br[15:0];
        2'd1: r = br[31:16];
        2'd2: r = br[47:32];
        2'd3: r = {4'b0, br[59:48]};
      endcase
    end
  end

  assign q = test_lam ? lam : x;
endmodule

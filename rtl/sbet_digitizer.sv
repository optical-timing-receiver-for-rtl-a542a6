// Space-borne event-timing digitizer: top level.
//
// A fast multiple-stop clock. After a mission start it counts 20 ns periods
// of a 50 MHz reference for up to 131 days, and every accepted event (laser
// start, echo stop, or any pulse) is stamped as a 60-bit word: 49 bits of
// whole clock periods since the mission start, 10 bits of interpolated
// fraction in T0/1024 = 19.53 ps steps, and a stop tag. The fraction is
// measured by an analog tandem interpolator outside this RTL, which returns
// three clock-correlated pulses T1, T2, T3 per event; the logic here counts
// the clock between them (coarse and fine counts), subtracts the mission
// start's own fraction by preloading complements, and adds the frozen
// mission count. Each event takes 256 clocks (5.12 us) of processing, during
// which the mission count is kept in an auxiliary counter.
//
// Modules, as on the instrument's CAMAC modules:
//   Clock and Calibrator: freq_divider, calibrator
//   Tandem Stretcher:     stretcher_control (+ external analog interpolator)
//   Logic 1:              control_logic, range_enable_counter, coarse_counter,
//                         fine_counter, aux_mission_counter, adder,
//                         event_register (ER1 part), buffer_register, display
//   Logic 2:              mission_counter2, event/buffer register upper part
//   Logic 3:              camac_logic
// The three CAMAC stations share one dataway: R lines, X and Q are ORed.
//
// Interface: clk is the shaped 50 MHz reference (CK1-CK3); cal_clk the
// Calibrator's reference input. CAMAC strobes are one-clock pulses on clk.
// interp_busy / interp_clear / interp_power_on go to the analog
// interpolator, t1 / t2 / t3 come back from it. buffer_data is the Buffer
// Register as wired to the displays. The wiring follows the document's
// module diagrams; where they are silent the choices are listed in the
// submodules' headers.
`timescale 1ns / 1ps
module sbet_digitizer (
  input  logic        clk,
  input  logic        rst_n,
  // CAMAC dataway
  input  logic        n_clock,
  input  logic        n_stretcher,
  input  logic        n_logic,
  input  logic [4:0]  f,
  input  logic [3:0]  a,
  input  logic        s1,
  input  logic        s2,
  input  logic        z,
  input  logic        c,
  input  logic [23:0] w,
  output logic [15:0] r,
  output logic        x,
  output logic        q,
  output logic        lam,
  // Clock and Calibrator module
  input  logic        cal_clk,
  input  logic [3:0]  cal_range_sw,
  output logic        cal_start_out,
  output logic        cal_stop_out,
  output logic        cal_sync_out,
  output logic        f12, f13, f8, f9, f10, f11, f11s,
  output logic        mission_start_out,
  // Tandem Stretcher front panel
  input  logic        mission_start_in,
  input  logic        mission_enable_in,
  input  logic        event_start_in,
  input  logic        start_gate_in,
  input  logic        event_stop_in,
  input  logic        stop_gate_in,
  output logic        busy_out,
  // analog interpolator
  output logic        interp_busy,
  output logic        interp_clear,
  output logic        interp_power_on,
  input  logic        t1,
  input  logic        t2,
  input  logic        t3,
  // Logic modules' panels
  output logic        gate_out,
  input  logic        display1_on,
  input  logic        display2_on,
  input  sbet_pkg::group_sw_e group_sw,
  output logic [15:0] led1,
  output logic [15:0] led2,
  input  sbet_pkg::mode_sw_e mode_sw,
  input  logic        manual_buffer_clear,
  input  logic        ext_clear,
  input  logic        auto_buffer_clear,
  input  logic        ext_mission_clear,
  output logic        event_ready_led,
  output logic        buffer_ready_led,
  output logic [59:0] buffer_data
);
  import sbet_pkg::*;

  // ---------------- Clock and Calibrator
  logic x_clk, div_enabled;
  freq_divider u_div (
    .clk, .rst_n, .n_sel(n_clock), .f, .a, .s1, .z, .x(x_clk),
    .enabled(div_enabled), .f12, .f13, .f8, .f9, .f10, .f11, .f11s,
    .mission_start_out
  );

  calibrator u_cal (
    .clk(cal_clk), .rst_n, .range_sw(cal_range_sw),
    .start_out(cal_start_out), .stop_out(cal_stop_out), .sync_out(cal_sync_out)
  );

  // ---------------- Logic 3 outputs used everywhere
  logic mcr, event_clear, clear_regs, buffer_strobe;
  logic load_rc_reg, load_ec_reg, load_range, load_enable;
  logic logic_me_onoff, logic_mission_enable, logic_stg_onoff;
  logic logic_start_enable, logic_spg, logic_stop_enable, stop_tag;

  // ---------------- Tandem Stretcher logic
  logic x_str, q_str;
  stretcher_control u_str (
    .clk, .rst_n,
    .mission_start_in, .mission_enable_in, .event_start_in, .start_gate_in,
    .event_stop_in, .stop_gate_in, .busy_out,
    .logic_mission_enable, .logic_me_onoff, .logic_start_enable,
    .logic_stg_onoff, .logic_stop_enable, .logic_spg,
    .event_clear,
    .n_sel(n_stretcher), .f, .a, .s1, .z, .x(x_str), .q(q_str),
    .busy(interp_busy), .power_on(interp_power_on)
  );
  assign interp_clear = event_clear;

  // ---------------- Logic 1: control
  logic mission_latch, event_enable, event_busy, mission_train, range_clock;
  logic sbet_busy, coarse_train, fine_train, aux_start, ec_clear, stop_enabled;
  control_logic u_ctl (
    .clk, .rst_n, .enable(interp_power_on), .t1, .t2, .t3,
    .mcr, .cr(event_clear), .ec_clear,
    .mission_latch, .event_enable, .event_busy, .mission_train,
    .range_clock, .sbet_busy, .coarse_train, .fine_train, .aux_start
  );

  range_enable_counter u_rec (
    .clk, .rst_n, .w, .load_rc_reg, .load_ec_reg, .load_range, .load_enable,
    .count_en(range_clock), .stop_enabled, .ec_clear
  );
  assign gate_out = stop_enabled;

  // ---------------- Logic 1: counters and adder
  logic [7:0] mc1;
  logic       mc19, carry_mc2, er_strobe, reg_strobe, strobe_latch, mc_ready, aux_active;
  aux_mission_counter u_ac (
    .clk, .rst_n, .mcr, .mission_train, .aux_start,
    .mc1, .mc19, .carry_mc2, .er_strobe, .reg_strobe, .strobe_latch,
    .mc_ready, .aux_active
  );

  logic [39:0] mc2;
  mission_counter2 u_mc2 (.clk, .rst_n, .mcr, .carry(carry_mc2), .count(mc2));

  logic [6:0] coarse_data, fine_data, cr_reg, fr_reg;
  coarse_counter u_cc (
    .clk, .rst_n, .mcr, .train(coarse_train), .reg_strobe,
    .load(event_clear), .to_adder(coarse_data), .cr_reg
  );
  fine_counter u_fc (
    .clk, .rst_n, .mcr, .train(fine_train), .reg_strobe,
    .load(event_clear), .to_adder(fine_data), .fr_reg
  );

  logic [11:0] low_word;
  logic        ad13, ad13_borrow;
  adder u_add (
    .fine(fine_data), .coarse(coarse_data), .mc_low(mc1[1:0]),
    .low_word, .ad13, .ad13_borrow
  );

  // ---------------- Event and Buffer Registers, displays
  logic [59:0] event_word;
  event_register u_er (
    .clk, .rst_n, .clear(mcr || clear_regs), .strobe(er_strobe),
    .low_word, .ad13, .ad13_borrow,
    .mission_hi({mc2, mc19, mc1[7:2]}), .stop_tag, .word(event_word)
  );

  buffer_register u_br (
    .clk, .rst_n, .clear(clear_regs), .strobe(buffer_strobe),
    .d(event_word), .q(buffer_data)
  );

  led_display u_led (
    .br(buffer_data), .display1_on, .display2_on, .group(group_sw), .led1, .led2
  );

  // ---------------- Logic 3
  logic x_log, q_log;
  camac_logic u_cam (
    .clk, .rst_n, .n_sel(n_logic), .f, .a, .s1, .s2, .z, .c,
    .r, .x(x_log), .q(q_log), .lam,
    .mode(mode_sw), .manual_buffer_clear, .ext_clear, .auto_buffer_clear,
    .ext_mission_clear,
    .br(buffer_data), .mission_latch, .event_busy, .stretcher_busy(interp_busy),
    .mc_ready, .stop_enabled,
    .mcr, .event_clear, .clear_regs, .buffer_strobe,
    .load_rc_reg, .load_ec_reg, .load_range, .load_enable,
    .logic_me_onoff, .logic_mission_enable, .logic_stg_onoff,
    .logic_start_enable, .logic_spg, .logic_stop_enable, .stop_tag,
    .event_ready_led, .buffer_ready_led
  );

  // wired-OR dataway responses
  assign x = x_clk || x_str || x_log;
  assign q = x_clk || q_str || q_log;
endmodule

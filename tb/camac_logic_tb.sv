// Self-checking test of the Logic 3 CAMAC Logic and Command Memory.
// Checked against the document's command list: the four read sub-addresses
// return D1-D60 of the Buffer Register; F(24)/F(26) on A(1)-A(7) switch each
// command latch and its line (gate latches drive their line inverted);
// Mission Enable is dropped by the mission start, Event Start and Event Stop
// by Event Clear; F(2)A(7)S2 and Z.S2 give Mission Clear; LAM follows the
// buffer hand-off and its enable, F(8)A(0) tests it, F(2)A(3)S2 and
// F(10)A(0)S2 release the buffer, and a second event waits while the buffer
// is full; the MISSION CLEAR input also clears the registers; the
// rear-panel ENA and TEST modes; the stop tag. The one-clock strobe pulses
// and the one-clock Mission Clear delay are this design's.
`timescale 1ns / 1ps
module camac_logic_tb;
  import sbet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic n_sel = 0, s1 = 0, s2 = 0, z = 0, c = 0;
  logic [4:0] f = 0;
  logic [3:0] a = 0;
  logic [15:0] r;
  logic x, q, lam;
  mode_sw_e mode = MODE_NEUTRAL;
  logic manual_buffer_clear = 0, ext_clear = 0, auto_buffer_clear = 0, ext_mission_clear = 0;
  logic [59:0] br = '0;
  logic mission_latch = 0, event_busy = 0, stretcher_busy = 0, mc_ready = 0, stop_enabled = 0;
  logic mcr, event_clear, clear_regs, buffer_strobe, load_rc_reg, load_ec_reg, load_range, load_enable;
  logic logic_me_onoff, logic_mission_enable, logic_stg_onoff, logic_start_enable;
  logic logic_spg, logic_stop_enable, stop_tag, event_ready_led, buffer_ready_led;
  int checks = 0, failures = 0;
  int n_mcr = 0, n_clear = 0, n_strobe = 0;

  camac_logic dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) begin
    if (mcr) n_mcr++;
    if (event_clear) n_clear++;
    if (buffer_strobe) n_strobe++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one dataway cycle: command on for a clock, strobe 1 or 2 for one clock
  task automatic cyc(input int fn, input int an, input int strobe);
    @(negedge clk);
    n_sel = 1; f = 5'(fn); a = 4'(an);
    s1 = (strobe == 1); s2 = (strobe == 2);
    @(negedge clk);
    n_sel = 0; f = 0; a = 0; s1 = 0; s2 = 0;
  endtask

  task automatic event_done();     // Mission Counter Ready from the AC
    @(negedge clk) mc_ready = 1; @(negedge clk) mc_ready = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    logic [59:0] v;
    int m0, c0, s0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- reads
    for (int i = 0; i < 200; i++) begin
      v = {$urandom, $urandom};
      br = v;
      for (int sa = 0; sa < 4; sa++) begin
        @(negedge clk); n_sel = 1; f = 5'((i % 2) ? F_READ2 : F_READ0); a = 4'(sa); #1;
        check(x && q, "read X Q");
        check(r == (sa == 3 ? {4'b0, v[59:48]} : v[16*sa +: 16]), $sformatf("read A%0d", sa));
      end
      @(negedge clk); n_sel = 0; f = 0; a = 0;
    end
    @(negedge clk); n_sel = 1; f = 5'd3; a = 0; #1 check(!x && r == 0, "no X on F3"); n_sel = 0;
    // ---- F16 loads
    @(negedge clk); n_sel = 1; f = F_WRITE; a = 0; s1 = 1; #1 check(load_rc_reg && !load_range, "F16A0S1");
    s1 = 0; s2 = 1; #1 check(load_range && !load_rc_reg, "F16A0S2");
    a = 1; #1 check(load_enable, "F16A1S2"); s2 = 0; s1 = 1; #1 check(load_ec_reg, "F16A1S1");
    @(negedge clk); n_sel = 0; s1 = 0; f = 0; a = 0;
    // ---- command latches
    check(logic_me_onoff && logic_stg_onoff && logic_spg, "gates inactive after reset");
    check(!logic_mission_enable && !logic_start_enable && !logic_stop_enable, "enables off");
    cyc(F_DISABLE, 2, 1); check(!logic_me_onoff, "F24A2 activates mission gate");
    cyc(F_ENABLE, 2, 1);  check(logic_me_onoff, "F26A2 deactivates mission gate");
    cyc(F_DISABLE, 4, 1); check(!logic_stg_onoff, "F24A4 start gate");
    cyc(F_DISABLE, 6, 1); check(!logic_spg, "F24A6 stop gate");
    cyc(F_ENABLE, 3, 1);  check(logic_mission_enable, "F26A3 mission enable");
    @(negedge clk) mission_latch = 1;
    @(negedge clk); #1 check(!logic_mission_enable, "mission enable dropped by mission start");
    cyc(F_ENABLE, 1, 1);  check(logic_mission_enable, "F26A1 time readout");
    cyc(F_DISABLE, 1, 1); check(!logic_mission_enable, "F24A1 time readout off");
    cyc(F_ENABLE, 5, 1);  check(logic_start_enable, "F26A5 event start");
    cyc(F_ENABLE, 7, 1);  check(logic_stop_enable, "F26A7 event stop");
    cyc(F_DISABLE, 7, 1); check(!logic_stop_enable, "F24A7");
    stop_enabled = 1; #1 check(logic_stop_enable, "STOP ENABLED enables stop"); stop_enabled = 0;
    cyc(F_ENABLE, 7, 1);
    // ---- event hand-off, LAM and buffer-full hold
    cyc(F_ENABLE, 0, 2);
    c0 = n_clear; s0 = n_strobe;
    event_done();
    check(n_strobe == s0 + 1 && n_clear == c0 + 1, "buffer strobe and Event Clear");
    check(lam && buffer_ready_led && !event_ready_led, "LAM after buffer strobe");
    check(!logic_start_enable && !logic_stop_enable, "Event Start/Stop dropped by Event Clear");
    @(negedge clk); n_sel = 1; f = F_TESTL; #1 check(x && q, "F8 Q=1 with LAM"); n_sel = 0; f = 0;
    event_done();                     // second event while the buffer is full
    check(n_strobe == s0 + 1 && event_ready_led, "second event held");
    cyc(F_READ2, 3, 2);               // read the last word with release
    repeat (3) @(negedge clk);
    check(n_strobe == s0 + 2 && lam && !event_ready_led, "held event moved after release");
    cyc(F_CLRL, 0, 2);
    check(!lam && !buffer_ready_led, "F10A0S2 clears LAM");
    @(negedge clk); n_sel = 1; f = F_TESTL; #1 check(x && !q, "F8 Q=0 without LAM"); n_sel = 0; f = 0;
    cyc(F_DISABLE, 0, 2);
    event_done();
    check(buffer_ready_led && !lam, "LAM disabled");
    // front-panel button holds, external clear releases
    manual_buffer_clear = 1;
    event_done();
    check(!buffer_ready_led && event_ready_led, "button held: buffer clear, event waits");
    manual_buffer_clear = 0;
    repeat (3) @(negedge clk);
    check(buffer_ready_led && !event_ready_led, "button released: event moves");
    @(negedge clk) ext_clear = 1; @(negedge clk) ext_clear = 0;
    check(!buffer_ready_led, "EXT. CLEAR");
    auto_buffer_clear = 1;
    s0 = n_strobe;
    for (int i = 0; i < 5; i++) event_done();
    check(n_strobe == s0 + 5, "automatic buffer clear");
    auto_buffer_clear = 0;
    // ---- stop tag
    @(negedge clk) stop_enabled = 1; @(negedge clk) stretcher_busy = 1; @(negedge clk) stop_enabled = 0;
    @(negedge clk) check(stop_tag, "stop tag");
    @(negedge clk) stretcher_busy = 0;
    event_done(); check(!stop_tag, "tag cleared");
    @(negedge clk) stretcher_busy = 1; @(negedge clk) check(!stop_tag, "no tag outside aperture");
    stretcher_busy = 0;
    // ---- mission clear
    m0 = n_mcr;
    cyc(F_READ2, 7, 2); @(negedge clk);
    check(n_mcr == m0 + 1, "F2A7S2 MCR");
    @(negedge clk) z = 1; s2 = 1; @(negedge clk) z = 0; s2 = 0; @(negedge clk);
    check(n_mcr == m0 + 2, "Z.S2 MCR");
    @(negedge clk) ext_mission_clear = 1;
    #1 check(clear_regs, "MISSION CLEAR clears the registers");
    @(negedge clk) ext_mission_clear = 0; @(negedge clk);
    check(n_mcr == m0 + 3, "external mission clear");
    check(logic_me_onoff && logic_stg_onoff && logic_spg, "MCR resets gates");
    // ---- C.S2
    c0 = n_clear;
    @(negedge clk) c = 1; s2 = 1; #1 check(clear_regs, "C.S2 clears registers"); @(negedge clk) c = 0; s2 = 0;
    @(negedge clk) check(n_clear == c0 + 1 && n_mcr == m0 + 3, "C.S2 Event Clear, no MCR");
    // ---- modes
    mission_latch = 0;
    mode = MODE_ENA; #1 check(logic_mission_enable, "ENA enables mission start");
    auto_buffer_clear = 1;
    event_busy = 0; event_done(); check(n_mcr == m0 + 3, "ENA: no automatic MCR");
    mode = MODE_TEST;
    event_done(); check(n_mcr == m0 + 3, "TEST: mission start keeps the mission");
    @(negedge clk) event_busy = 1; @(negedge clk) event_busy = 0;
    event_done(); check(n_mcr == m0 + 4, "TEST: MCR after an event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

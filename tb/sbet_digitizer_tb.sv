// End-to-end test of the SBET digitizer at its full size (no parameter is
// overridden), with the analog tandem interpolator replaced by its
// behavioural model and the host by CAMAC dataway tasks.
//
// Every event time is random to the picosecond. Each read-out word of an
// event after the mission start is checked against the event's true time:
// the 59-bit time D (bits D1-D59) must equal
// 1024 * (t_event - t_mission) / T0 + OFFSET within +-2 LSB (T0 / 1024 =
// 19.5 ps), where OFFSET is the fixed constant of this design's pipeline.
// Differences between events therefore match the true intervals, which is
// what the document asks of the instrument. The mission start's own word
// holds the mission's phase constant, which differs from mission to mission
// over about 1024 channels as the document describes; it is only checked to
// lie in that band. The mechanisms
// exercised and counted are: CAMAC mission start and front-panel mission
// start; start events; stop events inside the Range/Enable aperture with
// the stop tag; the Range/Enable Counter reload; the buffer-full hold and
// its release by F(2)A(3)S2, F(10)A(0)S2 and the front-panel button;
// LAM and F(8)A(0); C.S2; the rear-panel ENA and TEST modes (TEST clears the
// mission after every event); the Calibrator driving the inputs at the
// 40.96 us range; the Calibrator's 5.12 us markers with the buffer dumped
// automatically (every second marker falls in the dead time, so events are
// 10.24 us apart); uncorrelated markers 32.768 us apart with the mission
// cleared after every second one; the Frequency Divider commands, and a
// mission started by its own 1 Hz MISSION START output, whose next pulse
// must read exactly one second; stretcher stand-by
// (F(24)/F(26)/F(27)); the LED displays. A mechanism that is never seen
// counts as a failure.
`timescale 1ns / 1ps
module sbet_digitizer_tb;
  import sbet_pkg::*;

  localparam realtime T0 = 20.0;
  localparam int OFFSET = -1025;

  logic clk = 0, rst_n = 0;
  logic n_clock = 0, n_stretcher = 0, n_logic = 0, s1 = 0, s2 = 0, z = 0, c = 0;
  logic [4:0] f = 0;
  logic [3:0] a = 0;
  logic [23:0] w = 0;
  logic [15:0] r;
  logic x, q, lam;
  logic [3:0] cal_range_sw = 0;
  logic cal_start_out, cal_stop_out, cal_sync_out;
  logic f12, f13, f8, f9, f10, f11, f11s, mission_start_out;
  logic ms_pulse = 0, mission_enable_in = 0, event_start_in = 0, start_gate_in = 0;
  logic es_pulse = 0, stop_gate_in = 0, busy_out;
  logic mission_start_in, event_stop_in;
  logic cal_to_inputs = 0, div_to_input = 0;
  logic interp_busy, interp_clear, interp_power_on, t1, t2, t3;
  logic gate_out, display1_on = 1, display2_on = 1;
  group_sw_e group_sw = GROUP_A;
  logic [15:0] led1, led2;
  mode_sw_e mode_sw = MODE_NEUTRAL;
  logic manual_buffer_clear = 0, ext_clear = 0, auto_buffer_clear = 0, ext_mission_clear = 0;
  logic event_ready_led, buffer_ready_led;
  logic [59:0] buffer_data;

  assign mission_start_in = ms_pulse || (cal_to_inputs && cal_start_out) ||
                            (div_to_input && mission_start_out);
  assign event_stop_in    = es_pulse;

  sbet_digitizer dut (.*, .cal_clk(clk));
  tandem_interpolator_model #(.T0(T0)) interp (
    .clk, .busy(interp_busy), .clear(interp_clear), .t1, .t2, .t3
  );

  always #(T0 / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int mech [string];

  // Words passing into the Buffer Register, recorded while capture is on
  // (used when the buffer is cleared automatically).
  bit capture = 0;
  longint dumped [$];
  always @(negedge clk)
    if (capture && dut.buffer_strobe) begin
      @(negedge clk);
      dumped.push_back(d_of(buffer_data));
    end
  realtime t_mission;

  initial begin
    #1500ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---- CAMAC dataway: N, F, A, W set up, then S1 and S2 for one clock each.
  // Station 0 = Clock and Calibrator, 1 = Tandem Stretcher, 2 = Logic 3.
  logic [15:0] r_got;
  logic x_got, q_got;
  task automatic camac(input int st, input int fn, input int an, input int wd = 0);
    @(negedge clk);
    n_clock = (st == 0); n_stretcher = (st == 1); n_logic = (st == 2);
    f = 5'(fn); a = 4'(an); w = 24'(wd);
    @(negedge clk);
    r_got = r; x_got = x; q_got = q;
    s1 = 1;
    @(negedge clk) s1 = 0; s2 = 1;
    @(negedge clk) s2 = 0;
    @(negedge clk);
    {n_clock, n_stretcher, n_logic} = '0; f = 0; a = 0; w = 0;
  endtask

  task automatic unaddressed(input bit zz, input bit cc);  // Z or C cycle
    @(negedge clk) z = zz; c = cc;
    @(negedge clk) s1 = 1;
    @(negedge clk) s1 = 0; s2 = 1;
    @(negedge clk) s2 = 0; z = 0; c = 0;
  endtask

  // Read D1-D60 with F(0)A(0..2) and F(2)A(3), which also releases the buffer.
  task automatic read_word(output logic [59:0] wd, input bit rel = 1);
    logic [63:0] v;
    for (int i = 0; i < 4; i++) begin
      camac(2, (i == 3 && rel) ? 2 : 0, i);
      check(x_got && q_got, "read X and Q");
      v[16*i +: 16] = r_got;
    end
    check(v[63:60] == 0, "unused read bits");
    wd = v[59:0];
  endtask

  task automatic wait_lam();
    int n = 0;
    while (!lam && n < 20000) begin @(negedge clk); n++; end
    check(lam, "LAM");
  endtask

  // ---- front-panel pulses at an arbitrary time (1 ps resolution)
  task automatic pulse_after(input int which, input realtime dt, output realtime t);
    #(dt);
    t = $realtime;
    case (which)
      0: ms_pulse = 1;
      1: event_start_in = 1;
      default: es_pulse = 1;
    endcase
    #5;
    {ms_pulse, event_start_in, es_pulse} = '0;
  endtask

  function automatic realtime rand_dt(input int lo_us, input int hi_us);
    return lo_us * 1000.0 + real'($urandom_range(0, (hi_us - lo_us) * 1000000)) / 1000.0;
  endfunction

  function automatic longint d_of(input logic [59:0] wd);
    longint d = longint'(wd[58:0]);
    if (wd[58]) d = d - (longint'(1) << 59);     // D59 used as the sign
    return d;
  endfunction

  task automatic check_time(input logic [59:0] wd, input realtime t, input bit tag, input string what);
    longint got, exp;
    exp = longint'($floor(1024.0 * (t - t_mission) / T0)) + OFFSET;
    got = d_of(wd);
    if (t == t_mission)                // mission start: phase constant only
      check(got <= OFFSET && got > OFFSET - 1600,
            $sformatf("%s constant %0d", what, got));
    else
      check(got - exp <= 2 && exp - got <= 2,
            $sformatf("%s time %0d exp %0d (diff %0d)", what, got, exp, got - exp));
    check(wd[59] == tag, $sformatf("%s stop tag %0b", what, wd[59]));
    // led displays show the buffer
    group_sw = group_sw_e'($urandom_range(0, 2));
    #1;
    check(led1 == wd[15:0], "led1");
    check(led2 == (group_sw == GROUP_A ? wd[31:16] : group_sw == GROUP_B ? wd[47:32]
                   : {4'b0, wd[59:48]}), "led2");
  endtask

  // One mission started from the front panel with the CAMAC Mission Enable,
  // followed by n start events. Each event is read after its LAM.
  // With by_camac the mission is started by F(25)A(0)S1 to the stretcher.
  task automatic mission_with_events(input int n, input bit by_camac);
    logic [59:0] wd;
    realtime t;
    camac(1, 9, 0);                    // (no function) must not answer
    check(!x_got, "no X for unknown stretcher command");
    camac(2, 2, 7);                    // Mission Clear
    camac(2, F_ENABLE, 3);             // Mission Enable
    if (by_camac) begin
      #(rand_dt(1, 3));
      camac(1, 25, 0);
      check(x_got, "F25 X");
      // S1 comes two clocks after the command is set up
      t_mission = $realtime - 3.0 * T0;
      mech["mission_start_camac"]++;
    end else begin
      pulse_after(0, rand_dt(1, 3), t_mission);
      mech["mission_start_panel"]++;
    end
    wait_lam();
    read_word(wd);
    check_time(wd, t_mission, 0, "mission start");
    for (int k = 0; k < n; k++) begin
      camac(2, F_ENABLE, 5);           // Event Start
      pulse_after(1, rand_dt(1, 40), t);
      wait_lam();
      camac(2, F_TESTL, 0);
      check(q_got, "F8 Q with LAM");
      mech["lam_test"]++;
      read_word(wd);
      check_time(wd, t, 0, "start event");
      mech["start_event"]++;
      camac(2, F_TESTL, 0);
      check(!q_got, "F8 no Q after release");
    end
  endtask

  initial begin
    logic [59:0] wd, wd2;
    realtime t, t_start, t_stop;
    repeat (3) @(negedge clk);
    rst_n = 1;
    unaddressed(1, 0);                 // Z: initialise
    check(interp_power_on, "stretcher on after Z");
    camac(2, F_ENABLE, 0);             // LAM enable

    // ---- Frequency Divider commands
    camac(0, F_ENABLE, 0);
    check(x_got, "clock X");
    repeat (10) @(negedge clk);
    begin
      int n = 0;
      repeat (100) begin @(posedge f12); n++; end
      check(n == 100, "f12 running");
    end
    camac(0, F_DISABLE, 0);
    repeat (3) @(negedge clk);
    check(!f12 && !f11, "divider stopped");
    mech["divider"]++;

    // ---- missions and start events
    for (int m = 0; m < 3; m++) mission_with_events(8, m == 1);

    // ---- stand-by: the stretcher ignores events
    camac(1, F_DISABLE, 0);
    camac(1, 27, 0);
    check(x_got && !q_got, "F27 Q=0 in stand-by");
    camac(2, F_ENABLE, 5);
    pulse_after(1, 2000.0, t);
    repeat (400) @(negedge clk);
    check(!buffer_ready_led && !event_ready_led, "no event in stand-by");
    camac(1, F_ENABLE, 0);
    camac(1, 27, 0);
    check(q_got, "F27 Q=1 when on");
    mech["standby"]++;
    camac(2, F_DISABLE, 5);

    // ---- Range/Enable aperture, stop tag and reload
    camac(2, 2, 7);
    camac(2, F_ENABLE, 3);
    pulse_after(0, 1000.0, t_mission);
    wait_lam(); read_word(wd); check_time(wd, t_mission, 0, "mission start (range)");
    camac(2, F_WRITE, 0, 1500);        // Range: 30 us
    camac(2, F_WRITE, 1, 250);         // Enable: 5 us
    for (int k = 0; k < 4; k++) begin
      camac(2, F_ENABLE, 5);
      pulse_after(1, rand_dt(2, 5), t_start);
      // a stop before the aperture is not accepted
      pulse_after(2, 10000.0, t);
      check(!gate_out, "aperture closed");
      wait_lam(); read_word(wd); check_time(wd, t_start, 0, "range start");
      wait (gate_out);
      mech["aperture"]++;
      pulse_after(2, real'($urandom_range(100, 4000)), t_stop);
      wait_lam(); read_word(wd); check_time(wd, t_stop, 1, "tagged stop");
      check((t_stop - t_start) > 30000.0, "stop after the range");
      mech["stop_tag"]++;
      if (k > 0) mech["range_reload"]++;   // counters reloaded from RC/EC register
      wait (!gate_out);
    end
    camac(2, F_WRITE, 0, 0);           // no more apertures
    camac(2, F_WRITE, 1, 0);

    // ---- buffer full: the second event waits in the Event Register
    camac(2, F_ENABLE, 5);
    pulse_after(1, 3000.0, t);
    wait_lam();
    camac(2, F_ENABLE, 5);
    pulse_after(1, 2000.0, t_start);
    repeat (400) @(negedge clk);
    check(event_ready_led && buffer_ready_led, "event waits for the buffer");
    read_word(wd, 0);
    check_time(wd, t, 0, "first of two");
    camac(2, F_CLRL, 0);               // F(10)A(0)S2 releases
    repeat (3) @(negedge clk);
    check(!event_ready_led && lam, "held event moved");
    read_word(wd2);
    check_time(wd2, t_start, 0, "held event");
    mech["read_release"]++;
    mech["buffer_hold"]++;
    // front-panel button held: the buffer is bypassed, the event waits
    manual_buffer_clear = 1;
    camac(2, F_ENABLE, 5);
    pulse_after(1, 2000.0, t);
    repeat (400) @(negedge clk);
    check(event_ready_led && !lam, "button holds the buffer clear");
    manual_buffer_clear = 0;
    wait_lam(); read_word(wd); check_time(wd, t, 0, "after button");
    mech["manual_clear"]++;

    // ---- C.S2 clears the buffer and the event register, keeps the mission
    camac(2, F_ENABLE, 5);
    pulse_after(1, 2000.0, t);
    wait_lam();
    unaddressed(0, 1);
    repeat (2) @(negedge clk);
    check(!lam && buffer_data == 0, "C.S2 clears");
    camac(2, F_ENABLE, 5);
    pulse_after(1, 2000.0, t);
    wait_lam(); read_word(wd); check_time(wd, t, 0, "after C");
    mech["c_clear"]++;

    // ---- TEST mode: stop watch, every event clears the mission
    camac(2, 2, 7);
    mode_sw = MODE_TEST;
    for (int k = 0; k < 3; k++) begin
      pulse_after(0, rand_dt(2, 4), t_mission);
      wait_lam(); read_word(wd); check_time(wd, t_mission, 0, "test start");
      camac(2, F_ENABLE, 7);
      pulse_after(2, rand_dt(1, 30), t);
      wait_lam(); read_word(wd); check_time(wd, t, 0, "test stop");
      repeat (3) @(negedge clk);
      check(!dut.mission_latch, "mission cleared after the event");
      mech["test_mode"]++;
    end

    // ---- Calibrator into the Mission Start input, ENA mode
    mode_sw = MODE_ENA;
    camac(2, 2, 7);
    @(negedge clk);
    // markers every 2^11 clocks (40.96 us); the first comes at once, the
    // others with the next clock edges, half a period later in phase
    cal_range_sw = 4;
    cal_to_inputs = 1;
    t_mission = $realtime;
    for (int k = 0; k < 6; k++) begin
      wait_lam(); read_word(wd);
      if (k == 0) check_time(wd, t_mission, 0, "calibrator mission start");
      else begin
        check_time(wd, t_mission + k * 2048 * T0 - T0 / 2, 0, "calibrator marker");
        check(d_of(wd) == longint'(k) * 2048 * 1024 - 512 + OFFSET, "calibrator exact");
      end
      mech["calibrator"]++;
    end
    cal_to_inputs = 0; cal_range_sw = 0;

    // ---- rate test: markers every 2^8 clocks (5.12 us), buffer dumped
    // automatically. The dead time of an event (T1 two clocks after it,
    // 256 Auxiliary Counter clocks, hand-off) is longer than 5.12 us, so
    // every second marker is recorded, 10.24 us apart.
    camac(2, 2, 7);
    auto_buffer_clear = 1;
    dumped.delete();
    capture = 1;
    @(negedge clk);
    cal_range_sw = 3;
    cal_to_inputs = 1;
    repeat (256 * 41) @(negedge clk);
    cal_to_inputs = 0; cal_range_sw = 0;
    repeat (400) @(negedge clk);
    capture = 0;
    check(dumped.size() == 21, $sformatf("rate test events %0d", dumped.size()));
    for (int k = 2; k < dumped.size(); k++)
      check(dumped[k] - dumped[k-1] == 512 * 1024, $sformatf("rate test spacing %0d", dumped[k] - dumped[k-1]));
    mech["rate_5us"] += dumped.size();

    // ---- uncorrelated markers 32.768 us apart, mission cleared after every
    // second marker (TEST mode): each mission start / event pair must give
    // the same interval, 32768 / 20 * 1024 = 1677721.6 channels, whatever
    // the phase of the mission start.
    camac(2, 2, 7);
    mode_sw = MODE_TEST;
    dumped.delete();
    capture = 1;
    begin
      realtime t0;
      t0 = $realtime + 1000.0 + real'($urandom_range(0, 19999)) / 1000.0;
      for (int k = 0; k < 20; k++) begin
        #(t0 + k * 32768.0 - $realtime);
        ms_pulse = 1; #5 ms_pulse = 0;
      end
    end
    repeat (400) @(negedge clk);
    capture = 0;
    check(dumped.size() == 20, $sformatf("interval test words %0d", dumped.size()));
    for (int k = 1; k < dumped.size(); k += 2) begin
      longint iv;
      iv = dumped[k] - dumped[k-1];
      check(dumped[k] - OFFSET >= 1677720 && dumped[k] - OFFSET <= 1677723,
            $sformatf("interval %0d", dumped[k] - OFFSET));
      if (iv != 0) mech["interval_32us"]++;
    end
    auto_buffer_clear = 0;
    mode_sw = MODE_NEUTRAL;

    // ---- mission started by the divider's own MISSION START output: the
    // first 1 Hz pulse comes with the enabling command, and the next one,
    // a second later, must read exactly 50,000,000 clock periods later.
    camac(2, 2, 7);
    mode_sw = MODE_ENA;
    div_to_input = 1;
    fork
      begin
        @(posedge mission_start_out) t_mission = $realtime;
        @(posedge mission_start_out) t = $realtime;
      end
      camac(0, F_ENABLE, 0);
    join
    wait_lam(); read_word(wd);
    check_time(wd, t_mission, 0, "divider mission start");
    wait (lam);
    read_word(wd2);
    check_time(wd2, t, 0, "divider 1 Hz pulse");
    check(t - t_mission == 1.0e9, "1 s between MISSION START pulses");
    check(d_of(wd2) == longint'(50_000_000) * 1024 + OFFSET, "1 s exact");
    mech["divider_mission_start"]++;
    camac(0, F_DISABLE, 0);
    div_to_input = 0;
    mode_sw = MODE_NEUTRAL;

    foreach (mech[s]) $display("MECH %s=%0d", s, mech[s]);
    check(mech.num() == 18, $sformatf("mechanisms seen %0d", mech.num()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

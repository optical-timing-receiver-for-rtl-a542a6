// Self-checking test of the Tandem Stretcher's input logic. Random settings
// of the six logic lines, the gate inputs and the Power On latch are applied
// and one input pulse is given between clock edges; the Busy Latch must be
// set at once exactly when the document's gate equations accept the pulse,
// must stay set until Event Clear, and must ignore pulses while set. The
// CAMAC commands F(24)/F(26)/F(27)A(0) and Z.S1 are checked on the Power On
// latch, X and Q, and F(25)A(0)S1 must start a mission.
`timescale 1ns / 1ps
module stretcher_control_tb;
  logic clk = 0, rst_n = 0;
  logic mission_start_in = 0, mission_enable_in = 0, event_start_in = 0, start_gate_in = 0;
  logic event_stop_in = 0, stop_gate_in = 0;
  logic busy_out;
  logic logic_mission_enable = 0, logic_me_onoff = 0, logic_start_enable = 0, logic_stg_onoff = 0;
  logic logic_stop_enable = 0, logic_spg = 0, event_clear = 0;
  logic n_sel = 0, s1 = 0, z = 0, x, q, busy, power_on;
  logic [4:0] f = 0;
  logic [3:0] a = 0;
  int checks = 0, failures = 0;

  stretcher_control dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic camac(input int fn, input bit strobe);
    @(negedge clk);
    n_sel = 1; f = 5'(fn); a = 0; s1 = strobe;
    #2;
  endtask
  task automatic camac_end();
    @(negedge clk); n_sel = 0; s1 = 0; f = 0; z = 0;
  endtask

  task automatic clear_busy();
    @(negedge clk) event_clear = 1; @(negedge clk) event_clear = 0;
  endtask

  initial begin
    int which;
    bit exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(power_on, "power on after reset");
    clear_busy();
    for (int i = 0; i < 3000; i++) begin
      {logic_mission_enable, logic_me_onoff, logic_start_enable, logic_stg_onoff,
       logic_stop_enable, logic_spg, mission_enable_in, start_gate_in, stop_gate_in} = 9'($urandom);
      which = int'($urandom_range(0, 2));
      @(posedge clk); #5;
      case (which)
        0: mission_start_in = 1;
        1: event_start_in = 1;
        default: event_stop_in = 1;
      endcase
      #1;
      case (which)
        0: exp = logic_mission_enable && (mission_enable_in || logic_me_onoff);
        1: exp = logic_start_enable && (start_gate_in || logic_stg_onoff);
        default: exp = logic_stop_enable && (stop_gate_in || logic_spg);
      endcase
      check(busy == exp && busy_out == exp, $sformatf("accept input %0d", which));
      #2 {mission_start_in, event_start_in, event_stop_in} = '0;
      repeat (2) @(posedge clk);
      check(busy == exp, "busy holds");
      if (busy) begin
        // a second pulse on any input changes nothing; clear ends busy
        @(posedge clk); #5 event_stop_in = 1; #2 event_stop_in = 0;
        check(busy, "still busy");
        clear_busy();
        #1 check(!busy, "cleared");
      end
    end
    // power off: nothing accepted, Q answers the status test
    camac(24, 1); check(x && q, "F24 X Q"); camac_end();
    check(!power_on, "power off");
    camac(27, 0); #1 check(x && !q, "F27 Q=0 when off"); camac_end();
    {logic_stop_enable, logic_spg} = 2'b11;
    @(posedge clk); #5 event_stop_in = 1; #2 event_stop_in = 0;
    check(!busy, "no event in stand-by");
    @(negedge clk); z = 1; s1 = 1; @(negedge clk); z = 0; s1 = 0;
    check(power_on, "Z.S1 powers on");
    camac(27, 0); #1 check(x && q, "F27 Q=1 when on"); camac_end();
    // CAMAC mission start needs neither a pulse nor the Logic Mission Enable
    {logic_mission_enable, logic_me_onoff} = 2'b01;
    camac(25, 1); #1 check(busy, "F25 S1 starts mission"); camac_end();
    clear_busy();
    camac(26, 1); check(x && q, "F26 X Q"); camac_end();
    camac(3, 0); check(!x, "no X for other F"); camac_end();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

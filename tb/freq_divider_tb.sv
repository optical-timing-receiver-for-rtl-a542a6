// Self-checking test of the Frequency Divider. To keep the run short the
// chain from f1 to f8 has two /5 stages here instead of seven; every other
// stage is full size. After F(26)A(0)S1 it measures the period and high
// time of every output against the ratios of the module's block diagram:
// f12 = f0/10, f13 = f0/40, f8 = f1/5^N, f9 = f8/2, f10 = f9/8,
// f11 = f9/64 and the one-clock f11s at the f11 rate (with seven stages
// these are 5 MHz, 1.25 MHz, 128 Hz, 64 Hz, 8 Hz and 1 Hz). It also
// checks that all outputs rise together on the first clock after the
// enable, that F(24)A(0)S1 and Z.S1 stop and clear the chain, and that X answers only F(24)/F(26)A(0). The one-clock
// f11s width and the f8 high time are this design's choices.
`timescale 1ns / 1ps
module freq_divider_tb;
  logic clk = 0, rst_n = 0, n_sel = 0, s1 = 0, z = 0;
  logic [4:0] f = 0;
  logic [3:0] a = 0;
  logic x, enabled, f12, f13, f8, f9, f10, f11, f11s, mission_start_out;
  int checks = 0, failures = 0;
  longint cyc = 0;

  localparam int N = 2;
  freq_divider #(.N_DIV5(N)) dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Period and high-time monitor for one output; records rising edges.
  logic [6:0] outs;
  assign outs = {f11s, f11, f10, f9, f8, f13, f12};
  longint last_rise [7], last_fall [7], period [7], high [7];
  int nrise [7];
  logic [6:0] outs_q = '0;
  always @(posedge clk) begin
    outs_q <= outs;
    for (int i = 0; i < 7; i++) begin
      if (outs[i] && !outs_q[i]) begin
        if (nrise[i] > 0) period[i] = cyc - last_rise[i];
        last_rise[i] = cyc;
        nrise[i]++;
      end
      if (!outs[i] && outs_q[i]) begin
        last_fall[i] = cyc;
        high[i] = cyc - last_rise[i];
      end
    end
  end

  task automatic cmd(input int fn, input bit zz);
    @(negedge clk); n_sel = !zz; f = 5'(fn); a = 0; s1 = 1; z = zz;
    #1 check(x == !zz, "X");
    @(negedge clk); n_sel = 0; f = 0; s1 = 0; z = 0;
  endtask

  localparam string NAMES [7] = '{"f12", "f13", "f8", "f9", "f10", "f11", "f11s"};
  localparam longint P8 = 5 * 5 ** N;
  localparam longint EXP_P [7] = '{10, 40, P8, 2 * P8, 16 * P8, 128 * P8, 128 * P8};
  localparam longint EXP_H [7] = '{5, 20, 5 * ((5 ** N + 1) / 2), P8, 8 * P8, 64 * P8, 1};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); n_sel = 1; f = 5'd25; #1 check(!x, "no X on F25"); n_sel = 0; f = 0;
    check(outs == '0 && !enabled, "stopped after reset");
    cmd(26, 0);
    #1 check(enabled && outs == '1, "all outputs rise together");
    repeat (int'(300 * P8)) @(posedge clk);
    for (int i = 0; i < 7; i++) begin
      check(nrise[i] >= 2, $sformatf("%s running", NAMES[i]));
      check(period[i] == EXP_P[i], $sformatf("%s period %0d exp %0d", NAMES[i], period[i], EXP_P[i]));
      check(high[i] == EXP_H[i], $sformatf("%s high %0d exp %0d", NAMES[i], high[i], EXP_H[i]));
    end
    check(mission_start_out == f11s, "MISSION START output");
    cmd(24, 0);
    @(posedge clk); #1 check(!enabled && outs == '0, "F24A0S1 stops");
    cmd(26, 0);
    repeat (1000) @(posedge clk);
    cmd(0, 1);
    @(posedge clk); #1 check(!enabled && outs == '0, "Z.S1 stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

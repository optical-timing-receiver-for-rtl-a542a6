// Self-checking test of the Range and Enable Counters. For random range R
// and enable E (loaded through the counters, or only through the RC/EC
// Register) the counting clock is switched on as a start event would; the
// stop aperture must be open in exactly the cycles R .. R+E-1 after that,
// EC Clear must come in its last cycle, and a second start without new
// loads must repeat the same aperture from the RC/EC Register.
`timescale 1ns / 1ps
module range_enable_counter_tb;
  logic clk = 0, rst_n = 0;
  logic [23:0] w = '0;
  logic load_rc_reg = 0, load_ec_reg = 0, load_range = 0, load_enable = 0, count_en = 0;
  logic stop_enabled, ec_clear;
  int checks = 0, failures = 0;

  range_enable_counter dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s, input logic [23:0] val);
    w = val; s = 1; @(negedge clk); s = 0;
  endtask

  // count_en stays high until ec_clear, as the Range Latch does
  task automatic run_window(input int r, input int e);
    int k;
    bit exp_open, exp_clr;
    k = 0;
    count_en = 1;
    forever begin
      #1;
      exp_open = k >= r && k < r + e;
      exp_clr  = (e > 0) ? (k == r + e - 1) : (k == r);
      checks++;
      if (stop_enabled != exp_open || ec_clear != exp_clr) begin
        failures++;
        if (failures < 8) $display("R=%0d E=%0d k=%0d open %b/%b clr %b/%b", r, e, k,
                                   stop_enabled, exp_open, ec_clear, exp_clr);
      end
      if (ec_clear || k > r + e + 5) break;
      @(negedge clk);
      k++;
    end
    @(negedge clk);
    count_en = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int r, e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      r = int'($urandom_range(0, 300));
      e = int'($urandom_range(1, 200));
      if (i % 2 == 0) begin
        pulse(load_range, 24'(r));
        pulse(load_enable, 24'(e));
      end else begin
        // only the RC/EC Register: takes effect after the pending aperture
        pulse(load_rc_reg, 24'(r));
        pulse(load_ec_reg, 24'(e));
        run_window(r_prev(), e_prev());
      end
      run_window(r, e);
      run_window(r, e);      // automatic reload
    end
    // the full 24-bit range width
    pulse(load_range, 24'hFFFFFF); pulse(load_enable, 24'(3));
    checks++;
    if (dut.rc != 24'hFFFFFF) begin failures++; $display("24-bit load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rp = 0, ep = 0;
  always @(posedge clk) if (load_range) rp <= int'(w); else if (load_enable) ep <= int'(w);
  function automatic int r_prev(); return rp; endfunction
  function automatic int e_prev(); return ep; endfunction
endmodule

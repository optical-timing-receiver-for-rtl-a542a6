// Self-checking test of the Logic 1 Control Logic. T1/T2/T3 are driven as
// the interpolator does: T1 at a clock edge b, T2 and T3 together at a later
// edge e, T3 falling between edges at f, all three dropping with Event
// Clear. Checked per event: the coarse train is on for exactly e - b clocks;
// the fine train for the clocks from e to f less two; Event Busy never on for
// the mission start and on for every later event; the mission train stays on
// from the mission start until Mission Clear; the range clock runs from T1
// until EC Clear.
`timescale 1ns / 1ps
module control_logic_tb;
  logic clk = 0, rst_n = 0, enable = 1, t1 = 0, t2 = 0, t3 = 0, mcr = 0, cr = 0, ec_clear = 0;
  logic mission_latch, event_enable, event_busy, mission_train, range_clock;
  logic sbet_busy, coarse_train, fine_train, aux_start;
  int checks = 0, failures = 0;
  int n_coarse, n_fine, n_busy, n_aux, n_train_off;

  control_logic dut (.*);
  always #10 clk = ~clk;

  always @(posedge clk) begin
    if (coarse_train) n_coarse++;
    if (fine_train)   n_fine++;
    if (event_busy)   n_busy++;
    if (aux_start)    n_aux++;
    if (mission_latch && !mission_train) n_train_off++;
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

  task automatic one_event(input bit is_start, input int nbe, input int nef);
    n_coarse = 0; n_fine = 0; n_busy = 0; n_aux = 0;
    @(posedge clk); #1 t1 = 1;                       // edge b
    repeat (nbe) @(posedge clk);
    #1 t2 = 1; t3 = 1;                               // edge e
    repeat (nef) @(posedge clk);
    #7 t3 = 0;                                       // f, between edges
    repeat (20) @(posedge clk);
    check(n_coarse == nbe, $sformatf("coarse %0d exp %0d", n_coarse, nbe));
    check(n_fine == nef - 1, $sformatf("fine %0d exp %0d", n_fine, nef - 1));
    check(n_aux > 0 && n_aux <= nbe + 1, "aux start pulse");
    check(is_start ? n_busy == 0 : n_busy > 0, "event busy");
    check(mission_train && mission_latch, "mission train running");
    check(range_clock, "range clock on");
    @(negedge clk) cr = 1;
    @(posedge clk); #1 t1 = 0; t2 = 0;
    @(negedge clk) cr = 0;
    repeat (3) @(posedge clk);
    check(!coarse_train && !fine_train && !sbet_busy, "cleared by CR");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      @(negedge clk) mcr = 1; @(negedge clk) mcr = 0;
      check(!mission_latch && !mission_train && !event_enable, "mission clear");
      one_event(1, 16 + int'($urandom_range(0, 32)), 16 + int'($urandom_range(0, 32)));
      check(event_enable, "event enable after mission start");
      for (int e = 0; e < 5; e++) begin
        one_event(0, 16 + int'($urandom_range(0, 32)), 16 + int'($urandom_range(0, 32)));
        @(negedge clk) ec_clear = 1; @(negedge clk) ec_clear = 0;
        check(!range_clock, "range clock stopped by EC clear");
      end
    end
    check(n_train_off == 0, "mission train never interrupted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

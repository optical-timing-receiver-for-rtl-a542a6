// Self-checking test of the Calibrator. For the ranges whose spacing fits a
// short run (positions 1 to 5: 2^2 to 2^14 clock periods, 80 ns to 328 us at
// 50 MHz) it checks that START, STOP and SYNC give one-clock markers exactly
// 2^(3n-1) clock periods apart, as the document's spacing formula says, and
// that the first marker comes in the clock in which the range is chosen.
// Position 0 (off) and the unused position 12 give no markers. A calibrator
// with two stages is also checked over all its positions, including the
// optional range K (2^(3n+2) for n stages).
`timescale 1ns / 1ps
module calibrator_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] range_sw = 0, range_sw2 = 0;
  logic start_out, stop_out, sync_out, start2, stop2, sync2;
  int checks = 0, failures = 0;

  calibrator dut (.*);
  calibrator #(.N_STAGES(2)) dut2 (.clk, .rst_n, .range_sw(range_sw2), .start_out(start2),
                                   .stop_out(stop2), .sync_out(sync2));
  always #10 clk = ~clk;

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

  // Select a range and check the spacing of the next few markers.
  task automatic run(input int pos, input int unsigned spacing, input bit two);
    int last, n, cyc;
    logic m, m_all;
    @(negedge clk);
    if (two) range_sw2 = 4'(pos); else range_sw = 4'(pos);
    last = -1; n = 0; cyc = 0;
    #1;
    while (n < 4 && cyc < 5 * int'(spacing) + 10) begin
      m = two ? start2 : start_out;
      m_all = two ? (stop2 && sync2) : (stop_out && sync_out);
      if (m) begin
        check(m_all, "all three outputs");
        if (n == 0) check(cyc == 0, $sformatf("pos %0d first marker at %0d", pos, cyc));
        else check(cyc - last == int'(spacing), $sformatf("pos %0d spacing %0d exp %0d", pos, cyc - last, spacing));
        last = cyc; n++;
      end
      @(posedge clk); #1;
      cyc++;
    end
    check(n == (spacing == 0 ? 0 : 4), $sformatf("pos %0d markers %0d", pos, n));
    @(negedge clk);
    range_sw = 0; range_sw2 = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0, 0);
    for (int p = 1; p <= 5; p++) run(p, 1 << (3 * p - 1), 0);
    run(12, 0, 0);
    for (int p = 1; p <= 3; p++) run(p, 1 << (3 * p - 1), 1);   // 3 = range K
    run(4, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

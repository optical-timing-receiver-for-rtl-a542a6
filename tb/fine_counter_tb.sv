// Self-checking test of the Fine Counter and Register. For random counts
// (N_ef for a mission start, then N_op for each later event) it drives the
// counting train, the register strobe and the event-clear load, and checks
// that the register holds N_ef and the Adder sees (N_op - N_ef - 1) mod 128.
`timescale 1ns / 1ps
module fine_counter_tb;
  logic clk = 0, rst_n = 0, mcr = 0, train = 0, reg_strobe = 0, load = 0;
  logic [6:0] to_adder, fr_reg;
  int checks = 0, failures = 0;

  fine_counter dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulses(input int n);
    train <= 1'b1; repeat (n) @(posedge clk); train <= 1'b0; @(posedge clk);
  endtask
  // which: 0 = Mission Clear, 1 = register strobe, 2 = load
  task automatic strobe(input int which);
    case (which)
      0: mcr <= 1'b1;
      1: reg_strobe <= 1'b1;
      default: load <= 1'b1;
    endcase
    @(posedge clk);
    {mcr, reg_strobe, load} <= '0;
    @(posedge clk);
  endtask

  initial begin
    int nbe, nlo;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 20; m++) begin
      strobe(0);
      nbe = 16 + int'($urandom_range(0, 32));
      pulses(nbe);
      strobe(1);
      checks++;
      if (fr_reg != 7'(nbe)) begin failures++; $display("fr_reg %0d exp %0d", fr_reg, nbe); end
      strobe(2);
      for (int e = 0; e < 10; e++) begin
        nlo = 16 + int'($urandom_range(0, 32));
        pulses(nlo);
        checks++;
        if (to_adder != 7'(nlo - nbe - 1)) begin
          failures++; $display("be=%0d lo=%0d got %0d", nbe, nlo, to_adder);
        end
        strobe(2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

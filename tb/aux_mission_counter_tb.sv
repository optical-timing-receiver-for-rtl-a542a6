// Self-checking test of the Auxiliary Counter and Mission Counter 1.
// A mission starts with an Auxiliary Counter Start at cycle t1; later
// events start at cycles tk. Checked: the Event Register strobe comes 128
// counts and Mission Counter Ready 256 counts after each start (5.12 us at
// 50 MHz); the mission count frozen at the strobe equals tk - t1 (the
// counter starts at -1, counts the clock edge on which the start is seen,
// and the 256 counts spent in the Auxiliary Counter are added back); the Coarse/Fine register strobe comes only
// once per mission; and the carries into Mission Counter 2 continue the count.
`timescale 1ns / 1ps
module aux_mission_counter_tb;
  logic clk = 0, rst_n = 0, mcr = 0, mission_train = 0, aux_start = 0;
  logic [7:0] mc1;
  logic mc19, carry_mc2, er_strobe, reg_strobe, strobe_latch, mc_ready, aux_active;
  int checks = 0, failures = 0;
  longint cyc = 0, upper = 0;
  int n_reg_strobe = 0;

  aux_mission_counter dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mcr) upper <= -1;   // preset to all ones with the rest
    else if (carry_mc2) upper <= upper + 1;
    if (reg_strobe) n_reg_strobe <= n_reg_strobe + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start_event(output longint t);
    @(negedge clk);
    aux_start = 1'b1;
    mission_train = 1'b1;
    t = cyc;
    repeat (3) @(negedge clk);
    aux_start = 1'b0;
  endtask

  initial begin
    longint t1, tk, ts, tr, m;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int mission = 0; mission < 3; mission++) begin
      @(negedge clk); mcr = 1; @(negedge clk); mcr = 0;
      repeat (5) @(posedge clk);
      start_event(t1);              // mission train and AC start come together
      for (int e = 0; e < 6; e++) begin
        if (e > 0) begin
          repeat (int'($urandom_range(1, 900))) @(negedge clk);
          start_event(tk);
        end else tk = t1;
        @(posedge er_strobe); ts = cyc;
        // mission count frozen at the strobe (read before the +256 takes effect)
        m = (upper << 9) + (longint'(mc19) << 8) + longint'(mc1);
        checks++;
        if (ts - tk != 129) begin failures++; $display("strobe after %0d cycles", ts - tk); end
        if (e > 0) begin
          checks++;
          if (m != tk - t1) begin failures++; $display("mission count %0d exp %0d", m, tk - t1); end
        end
        @(posedge mc_ready); tr = cyc;
        checks++;
        if (tr - tk != 257) begin failures++; $display("ready after %0d cycles", tr - tk); end
      end
      checks++;
      if (n_reg_strobe != mission + 1) begin failures++; $display("register strobes %0d", n_reg_strobe); end
      mission_train = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

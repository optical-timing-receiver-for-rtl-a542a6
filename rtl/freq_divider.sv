// Frequency Divider of the Clock and Calibrator module.
//
// A CAMAC-controlled Clock Enable Latch starts a divider chain on the 50 MHz
// reference: f0/5 gives f1 = 10 MHz; f1/2 and f1/8 give f12 = 5 MHz and
// f13 = 1.25 MHz; seven /5 stages give f8 = 128 Hz; f8/2 gives f9 = 64 Hz;
// f9/8 and f9/64 give f10 = 8 Hz and f11 = 1 Hz. f11s and mission_start_out
// are one-clock (20 ns) pulses at the start of every f11 period. This chain,
// the frequencies and the commands (F(26)A(0)S1 sets the latch, F(24)A(0)S1
// and Z.S1 clear it) follow the module's block diagram.
//
// All stages are held at zero while the latch is clear, so on the first clock
// after F(26)A(0)S1 every output goes high together: their relative phase is
// known for the whole mission. This design's choices: the stages are
// synchronous counters with clock enables rather than ripple dividers;
// outputs are high in the first half of their period; f8, whose period is an
// odd number of clocks, is high for 39063 of 78125 f1 periods; the 5 ns
// MISSION START spike is a one-clock pulse. CAMAC inputs are sampled on clk
// and S1 is a one-cycle strobe. X answers the two decoded commands.
`timescale 1ns / 1ps
module freq_divider #(
  parameter int unsigned PRE_DIV   = 5,  // f0/5
  parameter int unsigned N_DIV5    = 7,  // number of /5 stages from f1 to f8
  parameter int unsigned DIV5_BASE = 5
) (
  input  logic       clk,          // f0, 50 MHz
  input  logic       rst_n,
  input  logic       n_sel,        // station addressed (N)
  input  logic [4:0] f,
  input  logic [3:0] a,
  input  logic       s1,
  input  logic       z,
  output logic       x,
  output logic       enabled,      // Clock Enable Latch
  output logic       f12,          // 5 MHz
  output logic       f13,          // 1.25 MHz
  output logic       f8,           // 128 Hz
  output logic       f9,           // 64 Hz
  output logic       f10,          // 8 Hz
  output logic       f11,          // 1 Hz
  output logic       f11s,         // 1 Hz, one clock wide
  output logic       mission_start_out
);
  import sbet_pkg::*;

  localparam int unsigned PRE_W = $clog2(PRE_DIV);

  logic cmd_en, cmd_dis;
  assign cmd_en  = n_sel && f == F_ENABLE  && a == 4'd0 && s1;
  assign cmd_dis = (n_sel && f == F_DISABLE && a == 4'd0 && s1) || (z && s1);
  assign x       = n_sel && a == 4'd0 && (f == F_ENABLE || f == F_DISABLE);

  // Clock Enable Latch
  always_ff @(posedge clk) begin
    if (!rst_n || cmd_dis) enabled <= 1'b0;
    else if (cmd_en)       enabled <= 1'b1;
  end

  // f0/PRE_DIV
  logic [PRE_W-1:0] pre;
  logic             tick1;  // one f1 period completed
  assign tick1 = enabled && pre == PRE_W'(PRE_DIV - 1);
  always_ff @(posedge clk) begin
    if (!enabled)   pre <= '0;
    else if (tick1) pre <= '0;
    else            pre <= pre + 1'b1;
  end

  // f1/2 and f1/8
  logic [2:0] c1;
  always_ff @(posedge clk) begin
    if (!enabled)   c1 <= '0;
    else if (tick1) c1 <= c1 + 1'b1;
  end

  // Chain of /5 stages, f1 -> f8
  logic [2:0] d    [N_DIV5];
  logic       tick [N_DIV5+1];
  assign tick[0] = tick1;
  for (genvar i = 0; i < N_DIV5; i++) begin : g_div5
    assign tick[i+1] = tick[i] && d[i] == 3'(DIV5_BASE - 1);
    always_ff @(posedge clk) begin
      if (!enabled)       d[i] <= '0;
      else if (tick[i+1]) d[i] <= '0;
      else if (tick[i])   d[i] <= d[i] + 1'b1;
    end
  end

  // Position within one f8 period in f1 periods (mixed radix of the chain)
  localparam int unsigned F8_PERIOD = DIV5_BASE ** N_DIV5;
  localparam int unsigned F8_HIGH   = (F8_PERIOD + 1) / 2;
  logic [31:0] pos8;
  always_comb begin
    pos8 = '0;
    for (int i = N_DIV5 - 1; i >= 0; i--) pos8 = pos8 * DIV5_BASE + 32'(d[i]);
  end

  // f8/2, then f9/8 and f9/64
  logic       e9;
  logic [5:0] g9;
  logic       tick8;
  assign tick8 = tick[N_DIV5];
  always_ff @(posedge clk) begin
    if (!enabled) begin
      e9 <= 1'b0;
      g9 <= '0;
    end else if (tick8) begin
      e9 <= ~e9;
      if (e9) g9 <= g9 + 1'b1;
    end
  end

  logic chain_zero;
  always_comb begin
    chain_zero = pre == '0 && c1 == '0 && !e9 && g9 == '0;
    for (int i = 0; i < N_DIV5; i++) chain_zero &= d[i] == '0;
  end

  assign f12  = enabled && !c1[0];
  assign f13  = enabled && !c1[2];
  assign f8   = enabled && pos8 < F8_HIGH;
  assign f9   = enabled && !e9;
  assign f10  = enabled && !g9[2];
  assign f11  = enabled && !g9[5];
  assign f11s = enabled && chain_zero;
  assign mission_start_out = f11s;
endmodule

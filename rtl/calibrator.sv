// Calibrator of the Clock and Calibrator module: a marker pulse generator.
//
// The reference input f0 (up to 100 MHz, normally the digitizer's own 50 MHz
// clock) is divided by 4 and then by ten cascaded /8 stages. The RANGE switch
// (positions 1-10, ranges A-J) picks the tap after stage n, so markers are
// 2^(3n-1) clock periods apart: 80 ns for position 1 up to 10.74 s for
// position 10 at 50 MHz. Position 11 selects the optional range K (2^32),
// which on the instrument replaces one of the ten switch positions. The
// division ratios, the tap formula and the three outputs (START, STOP and
// SYNC) follow the document.
//
// This design's choices: the dividers form one 32-bit synchronous counter
// (the tap after stage n is its low 3n-1 bits), a marker is a one-clock pulse
// in the cycle in which the selected low bits are all zero, and the counter
// is held at zero while the switch is at 0 (off), so the first marker comes
// on the first clock after a range is selected. START and STOP are the two
// NIM outputs of the same marker; SYNC is a copy for monitoring.
`timescale 1ns / 1ps
module calibrator #(
  parameter int unsigned N_STAGES = 10,   // /8 stages after the /4
  parameter bit          RANGE_K  = 1'b1  // allow the optional 2^32 range
) (
  input  logic       clk,        // f0 reference input
  input  logic       rst_n,
  input  logic [3:0] range_sw,   // 0 = off, 1..10 = A..J, 11 = K
  output logic       start_out,
  output logic       stop_out,
  output logic       sync_out
);
  localparam int unsigned CNT_W = 2 + 3 * N_STAGES;

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] mask;
  logic             valid;

  always_comb begin
    valid = range_sw != 4'd0 &&
            (32'(range_sw) <= N_STAGES || (RANGE_K && 32'(range_sw) == N_STAGES + 1));
    // 2^(3n-1) => low 3n-1 bits
    mask = '0;
    for (int n = 1; n <= N_STAGES + 1; n++)
      if (32'(range_sw) == n) mask = CNT_W'((64'd1 << (3 * n - 1)) - 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !valid) cnt <= '0;
    else                  cnt <= cnt + 1'b1;
  end

  logic marker;
  assign marker    = valid && (cnt & mask) == '0;
  assign start_out = marker;
  assign stop_out  = marker;
  assign sync_out  = marker;
endmodule

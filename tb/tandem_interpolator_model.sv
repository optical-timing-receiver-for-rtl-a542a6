// Behavioural model of the analog Tandem Interpolator (test bench only).
//
// Follows the document's description of the two stretchers: the event
// (rise of the stretcher Busy at time a) charges the coarse stretcher until
// the second clock edge b after it, and T1 rises at b. The coarse stretcher
// then discharges 32 times slower; its end c gates the fine stretcher, which
// charges until the second clock edge e after c, when T2 and T3 rise. The
// fine stretcher discharges 32 times slower and T3 falls at its end f.
// So the coarse train holds N_lo = (c - b) / T0 clocks and the fine train
// measures (f - e) / T0. Each stretcher starts charging half a clock period
// (10 ns) after its start, as in the document, which keeps both trains
// between 16 and 48 clocks. The ideal linear stretch, the absence of noise
// and the 1 ns output delays are this model's choices. Everything drops just after a clock edge at which the clear line
// (Event Clear) is high. t_event and n_events report the accepted events.
`timescale 1ns / 1ps
module tandem_interpolator_model #(
  parameter realtime T0   = 20.0,   // clock period, ns
  parameter int      GAIN = 32      // stretch factor of each stretcher
) (
  input  logic clk,
  input  logic busy,
  input  logic clear,
  output logic t1 = 1'b0,
  output logic t2 = 1'b0,
  output logic t3 = 1'b0
);
  realtime t_event = 0.0;
  int      n_events = 0;

  task automatic convert();
    realtime a, b, c, e, f;
    a = $realtime;
    t_event = a;
    n_events++;
    @(posedge clk); @(posedge clk);
    b = $realtime;
    #1 t1 = 1'b1;
    c = b + GAIN * (b - a - T0 / 2.0);
    #(c - $realtime);
    @(posedge clk); @(posedge clk);
    e = $realtime;
    #1 begin t2 = 1'b1; t3 = 1'b1; end
    f = e + GAIN * (e - c - T0 / 2.0);
    #(f - $realtime) t3 = 1'b0;
    wait (1'b0);
  endtask

  task automatic wait_clear();
    do @(negedge clk); while (!clear);
    @(posedge clk);
    #1;
  endtask

  initial forever begin
    @(posedge busy);
    fork
      convert();
      wait_clear();
    join_any
    disable fork;
    {t1, t2, t3} = 3'b000;
  end
endmodule

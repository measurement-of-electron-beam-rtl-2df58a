// window_gen: integration window of programmable delay and duration.
//
// The demodulated signal is integrated from `start` to `stop` sample clocks after
// the selected trigger.  While `armed`, this block compares the selected source's
// time (from trig_timebase) with the two limits.  `open_o` is high for every clock
// with start <= t < stop, so the window holds stop-start samples; `done_o` goes high
// once t >= stop.  Nothing opens before the selected trigger has been seen in the
// current cycle.  If the engine is armed after `start` has already passed, the
// window opens at once and `late_o` reports the truncation.
//
// Timing: outputs are registered, one clock after the time value they describe.
// Delay and duration measured from either the linac or the extraction pulse are
// the measurement system's; the >= / < convention and the late flag are choices of
// this design.
module window_gen
  import charge_pkg::*;
#(
  parameter int unsigned T_W = TIME_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                armed,
  input  trig_sel_e           trig,
  input  logic [T_W-1:0]      start,
  input  logic [T_W-1:0]      stop,
  input  logic [1:0]          seen,
  input  logic [1:0][T_W-1:0] t,
  output logic                open_o,
  output logic                done_o,
  output logic                late_o
);

  logic           go;
  logic [T_W-1:0] ts;
  logic           first;   // first armed clock

  assign go = armed && seen[trig];
  assign ts = t[trig];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_o <= 1'b0;
      done_o <= 1'b0;
      late_o <= 1'b0;
      first  <= 1'b1;
    end else begin
      open_o <= go && (ts >= start) && (ts < stop);
      done_o <= go && (ts >= stop);
      first  <= !armed;
      if (!armed)                          late_o <= 1'b0;
      else if (first && go && ts > start)  late_o <= 1'b1;
    end
  end

endmodule

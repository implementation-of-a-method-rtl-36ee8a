// tdc_sync_logic: control logic of the TDC.
//
// Three kinds of flip-flop work concurrently, all with an asynchronous reset:
//   * start_dline_A goes high on the rising edge of `start` and launches the
//     edge into delay line A;
//   * start_dline_B goes high on the rising edge of `stop` and launches delay
//     line B;
//   * on each rising clock edge, a line that has been launched gets its stop
//     signal (stop_dline_A / stop_dline_B), which captures that line.
// Line A therefore measures T_A, from the start edge to the next clock edge,
// and line B measures T_B, from the stop edge to the next clock edge. The
// coarse counter is enabled while stop_dline_A is high and stop_dline_B is
// still low, so it counts N, the clock edges between the two capture edges.
// All outputs stay high until `reset`, which ends the measurement and returns
// both lines to their idle state.
//
// start and stop are asynchronous; an edge closer to a clock edge than the
// flip-flop's setup window may be attributed to either clock period (in
// hardware this shows as N varying by one; T_A or T_B then compensates).
// The active-high reset polarity is this design's choice.
module tdc_sync_logic (
  input  logic clock,
  input  logic start,
  input  logic stop,
  input  logic reset,          // asynchronous, active high
  output logic start_dline_A,
  output logic start_dline_B,
  output logic stop_dline_A,
  output logic stop_dline_B,
  output logic count_enable    // coarse counter window
);
  timeunit 1ps;
  timeprecision 10fs;

  always_ff @(posedge start or posedge reset) begin
    if (reset) start_dline_A <= 1'b0;
    else       start_dline_A <= 1'b1;
  end

  always_ff @(posedge stop or posedge reset) begin
    if (reset) start_dline_B <= 1'b0;
    else       start_dline_B <= 1'b1;
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      stop_dline_A <= 1'b0;
      stop_dline_B <= 1'b0;
    end else begin
      if (start_dline_A) stop_dline_A <= 1'b1;
      if (start_dline_B) stop_dline_B <= 1'b1;
    end
  end

  assign count_enable = stop_dline_A && !stop_dline_B;

  // With the inputs ordered (start no later than stop), line B is never
  // stopped before line A.
  a_order: assert property (@(posedge clock) disable iff (reset)
                            stop_dline_B |-> stop_dline_A)
    else $error("delay line B stopped before line A");
endmodule

// pps_normalizer: input switch and edge ordering in front of the TDC.
//
// `sel_src` chooses the pair of signals to compare: the local and the received
// PPS (SRC_PPS) or the two outputs of the delay generator (SRC_DELAY_GEN). The
// selected pair is also driven to dbg_1/dbg_2 for the board's debug outputs.
// The order of the two rising edges is not known in advance, so two
// flip-flops record that each input has risen; their OR is the TDC start
// (rises with the earlier edge) and their AND is the TDC stop (rises with the
// later edge). A third flip-flop, clocked by input 1, samples whether input 2
// had already risen: `negative` = 1 means input 2 came first, i.e. the
// measured interval, input 2 minus input 1, is negative.
// Everything is asynchronous to the clock; `reset` (active high) rearms the
// block for the next pair of edges. Because the edges are latched, the pulse
// widths of the inputs do not matter. The latching scheme and the sign
// convention are this design's choices; the function (the earlier edge always
// reaches the start input) follows the original design.
module pps_normalizer
  import tdc_pkg::*;
(
  input  logic     reset,
  input  src_sel_e sel_src,
  input  logic     pps_local,
  input  logic     pps_remote,
  input  logic     gen_start,
  input  logic     gen_stop,
  output logic     start,
  output logic     stop,
  output logic     negative,
  output logic     dbg_1,
  output logic     dbg_2
);
  timeunit 1ps;
  timeprecision 10fs;

  logic in_1, in_2, seen_1, seen_2;

  assign in_1  = (sel_src == SRC_DELAY_GEN) ? gen_start : pps_local;
  assign in_2  = (sel_src == SRC_DELAY_GEN) ? gen_stop  : pps_remote;
  assign dbg_1 = in_1;
  assign dbg_2 = in_2;

  always_ff @(posedge in_1 or posedge reset) begin
    if (reset) seen_1 <= 1'b0;
    else       seen_1 <= 1'b1;
  end

  always_ff @(posedge in_2 or posedge reset) begin
    if (reset) seen_2 <= 1'b0;
    else       seen_2 <= 1'b1;
  end

  always_ff @(posedge in_1 or posedge reset) begin
    if (reset) negative <= 1'b0;
    else       negative <= seen_2;
  end

  assign start = seen_1 || seen_2;
  assign stop  = seen_1 && seen_2;
endmodule

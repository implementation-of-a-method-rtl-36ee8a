// delay_generator: source of two edges a selectable, known delay apart.
//
// Used for development and calibration of the TDC. Every REPETITION periods
// of `clock` one clock pulse is let through a gate (the gate opens on a
// falling edge, so the pulse starts exactly on the rising clock edge). The
// pulse enters a chain of DELAY_LINE_SIZE buffer elements (LCELLs in the
// original FPGA): output_1 is the first element's output, output_2 the output
// of element delay * (DELAY_LINE_SIZE / 2^DELAY_W), chosen by a multiplexer.
// The delay between output_1 and output_2 is therefore
// delay * (DELAY_LINE_SIZE / 2^DELAY_W) * ELEM_DELAY_PS.
// The element delay is a simulation annotation of the physical buffer delay
// (synthesis ignores it); its value, the mapping of the 6-bit control to a
// tap, and the gating scheme are this design's choices; the line length 256,
// the repetition 67108864 and the 6-bit control are the original design's.
module delay_generator #(
  parameter int unsigned DELAY_LINE_SIZE = tdc_pkg::GEN_LINE_SIZE,
  parameter int unsigned REPETITION      = tdc_pkg::GEN_REPETITION,
  parameter int unsigned DELAY_W         = tdc_pkg::DELAY_CTRL_W,
  parameter real         ELEM_DELAY_PS   = 100.0
) (
  input  logic               reset,     // asynchronous, active high
  input  logic               clock,
  input  logic [DELAY_W-1:0] delay,
  output logic               output_1,
  output logic               output_2
);
  timeunit 1ps;
  timeprecision 10fs;

  localparam int unsigned STEP  = DELAY_LINE_SIZE >> DELAY_W;
  localparam int unsigned CNT_W = (REPETITION > 1) ? $clog2(REPETITION) : 1;

  logic [CNT_W-1:0]           cnt;
  logic                       fire;
  logic                       gated;
  logic [DELAY_LINE_SIZE-1:0] tap;

  always_ff @(posedge clock or posedge reset) begin
    if (reset)                               cnt <= '0;
    else if (cnt == CNT_W'(REPETITION - 1))  cnt <= '0;
    else                                     cnt <= cnt + 1'b1;
  end

  // Gate opened during the low phase before the chosen rising edge.
  always_ff @(negedge clock or posedge reset) begin
    if (reset) fire <= 1'b0;
    else       fire <= (cnt == '0);
  end

  assign gated = clock && fire;

  // One net per element (rather than one vector), so that each element only
  // reacts to its own input.
  for (genvar i = 0; i < DELAY_LINE_SIZE; i++) begin : g_line
    logic t;
    if (i == 0) begin : g_first
      assign #(ELEM_DELAY_PS) t = gated;
    end else begin : g_next
      assign #(ELEM_DELAY_PS) t = g_line[i-1].t;
    end
    assign tap[i] = t;
  end

  assign output_1 = tap[0];
  assign output_2 = tap[32'(delay) * STEP];
endmodule

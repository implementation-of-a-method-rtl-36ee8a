// carry_delay_line: fine-time delay line built from an adder carry chain, with
// its row of capture flip-flops.
//
// A LINE_SIZE-bit ripple-carry adder adds operand A (all zeros) and operand B
// (all ones). With the carry-in low the sum is all ones; when the trigger
// (start) drives the carry-in high the carry ripples down the chain and the sum
// bits fall from 1 to 0 one element after another, element 0 first. On the
// rising edge of `stop` the sum is stored in a row of D flip-flops, so `q`
// holds a thermometer code: the number of zeros counted from bit 0 is the
// number of elements the start edge passed before the stop edge.
//
// The operands are held in registers rather than tied to constants, as in the
// original design, where constant operands let the synthesis tool remove the
// chain. They are loaded with 0 and all ones at reset and can be rewritten
// through op_load/op_a/op_b (clock `clk`); they must hold A = 0, B = all ones
// for the line to work. The per-element delay is CARRY_DELAY_PS (8.59 ps is
// the measured mean of the original line); it only affects simulation.
//
// Timing: start and stop are asynchronous. q changes only on the rising edge
// of stop, or is forced to all ones (line idle) by the asynchronous reset.
// The capture row's reset value and the operand write port are this design's
// choices.
module carry_delay_line #(
  parameter int unsigned LINE_SIZE      = tdc_pkg::LINE_SIZE,
  parameter real         CARRY_DELAY_PS = 8.59
) (
  input  logic                 clk,       // operand register clock
  input  logic                 rst,       // asynchronous, active high
  input  logic                 op_load,   // write new operands
  input  logic [LINE_SIZE-1:0] op_a,
  input  logic [LINE_SIZE-1:0] op_b,
  input  logic                 start,     // carry-in: the edge to be delayed
  input  logic                 stop,      // capture clock
  output logic [LINE_SIZE-1:0] q,         // captured line state (thermometer)
  output logic                 carry_out  // end of the chain
);
  timeunit 1ps;
  timeprecision 10fs;

  logic [LINE_SIZE-1:0] reg_a, reg_b;
  logic [LINE_SIZE-1:0] sum;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      reg_a <= '0;
      reg_b <= '1;
    end else if (op_load) begin
      reg_a <= op_a;
      reg_b <= op_b;
    end
  end

  // One carry net per stage (rather than one vector), so that each stage
  // only reacts to its own carry-in.
  for (genvar i = 0; i < LINE_SIZE; i++) begin : g_chain
    logic cin, cout;
    if (i == 0) begin : g_first
      assign cin = start;
    end else begin : g_next
      assign cin = g_chain[i-1].cout;
    end
    full_adder #(.CARRY_DELAY_PS(CARRY_DELAY_PS)) u_fa (
      .a    (reg_a[i]),
      .b    (reg_b[i]),
      .cin  (cin),
      .s    (sum[i]),
      .cout (cout)
    );
  end

  assign carry_out = g_chain[LINE_SIZE-1].cout;

  always_ff @(posedge stop or posedge rst) begin
    if (rst) q <= '1;
    else     q <= sum;
  end
endmodule

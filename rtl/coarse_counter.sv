// coarse_counter: counts measurement clock periods for the coarse part N.
//
// While `en` is high the counter increments on every rising clock edge. On the
// first edge after `en` falls, the count is copied to `count_out`, `done` is
// set and the counter returns to zero, ready for the next measurement.
// `done` and `count_out` hold until the asynchronous reset. The WIDTH-bit
// counter (16 bits: 2^16 - 1 periods, 262.14 us at 4 ns) wraps around if the
// window is longer; `overflow` records that it did. The overflow flag is this
// design's addition.
module coarse_counter #(
  parameter int unsigned WIDTH = tdc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,        // asynchronous, active high
  input  logic             en,
  output logic [WIDTH-1:0] count_out,
  output logic             done,
  output logic             overflow
);
  timeunit 1ps;
  timeprecision 10fs;

  logic [WIDTH-1:0] count;
  logic             en_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count     <= '0;
      count_out <= '0;
      en_q      <= 1'b0;
      done      <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      en_q <= en;
      if (en) begin
        count <= count + 1'b1;
        if (&count) overflow <= 1'b1;
      end else if (en_q) begin
        count_out <= count;
        count     <= '0;
        done      <= 1'b1;
      end
    end
  end
endmodule

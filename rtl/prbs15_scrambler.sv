// prbs15_scrambler: multiplicative scrambler, polynomial x^15 + x^14 + 1.
//
// The slow PPS signal cannot be sent over the fiber as it is, so it is mixed
// with a pseudo-random sequence. The encoded bit is the input XOR the taps
// D(13) and D(14) of a 15-stage shift register; the encoded bit itself is
// shifted into D(0) on every rising clock edge. The output is combinational
// from data_in, so the PPS edge keeps its exact timing on the line; only the
// pseudo-random part changes on clock edges. With a constant input the line
// carries a maximum-length sequence of period 2^15 - 1.
// The structure follows the original design; the reset (to all ones, so the
// line never sits at a constant level) is this design's choice.
module prbs15_scrambler
  import tdc_pkg::*;
(
  input  logic clock,
  input  logic rst,          // asynchronous, active high
  input  logic data_in,
  output logic data_out
);
  timeunit 1ps;
  timeprecision 10fs;

  logic [PRBS_LEN-1:0] d;   // d[0] = D(0) ... d[14] = D(14)

  assign data_out = data_in ^ d[13] ^ d[14];

  always_ff @(posedge clock or posedge rst) begin
    if (rst) d <= '1;
    else     d <= {d[PRBS_LEN-2:0], data_out};
  end
endmodule

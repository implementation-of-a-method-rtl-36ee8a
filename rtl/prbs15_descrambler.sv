// prbs15_descrambler: multiplicative descrambler, polynomial x^15 + x^14 + 1.
//
// The received encoded bit is shifted into a 15-stage register on every
// rising clock edge; the decoded output is the received bit XOR the taps
// D(13) and D(14). It is self-synchronising: 15 clock periods after start the
// register holds the same bits as the sending scrambler's and the output
// equals the scrambler's input. The output is combinational from data_in, so
// the PPS edge passes with its sub-clock timing. For a clean output the
// descrambler clock must be aligned with the sender's clock as seen through
// the link (the original system distributes the master clock over a second
// fiber for this). Structure as in the original design; the reset is this
// design's choice.
module prbs15_descrambler
  import tdc_pkg::*;
(
  input  logic clock,
  input  logic rst,          // asynchronous, active high
  input  logic data_in,
  output logic data_out
);
  timeunit 1ps;
  timeprecision 10fs;

  logic [PRBS_LEN-1:0] d;

  assign data_out = data_in ^ d[13] ^ d[14];

  always_ff @(posedge clock or posedge rst) begin
    if (rst) d <= '1;
    else     d <= {d[PRBS_LEN-2:0], data_in};
  end
endmodule

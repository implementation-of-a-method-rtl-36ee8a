// prior_encoder: bubble-tolerant thermometer-to-binary encoder for one delay line.
//
// The captured delay line state has zeros from bit 0 up to the position the
// start edge reached and ones above it. Faster and slower elements can leave
// isolated wrong bits ("bubbles") near the transition, so instead of counting
// zeros the encoder takes the highest bit that is 0 and reports its position
// plus one: the number of elements the start edge has passed. An all-ones line
// gives 0.
//
// The search is combinational; the result is registered on `clk` while
// `decode` is high (decode is the line's stop signal, which stays high until
// the measurement is reset), so decoded_number is valid from the second clock
// edge after decode rises and `valid` says so. The output is
// [NUM_OF_OUT_BITS:0] wide, as in the original design. Registering on the
// measurement clock is this design's choice.
module prior_encoder #(
  parameter int unsigned NUM_OF_IN_BITS  = tdc_pkg::LINE_SIZE,
  parameter int unsigned NUM_OF_OUT_BITS = tdc_pkg::ENC_MSB
) (
  input  logic                      clk,
  input  logic                      rst,            // asynchronous, active high
  input  logic                      decode,
  input  logic [NUM_OF_IN_BITS-1:0] incoming_bits,
  output logic [NUM_OF_OUT_BITS:0]  decoded_number,
  output logic                      valid
);
  timeunit 1ps;
  timeprecision 10fs;

  logic [NUM_OF_OUT_BITS:0] position;
  logic                     decode_q;

  always_comb begin
    position = '0;
    for (int i = 0; i < int'(NUM_OF_IN_BITS); i++) begin
      if (!incoming_bits[i]) position = (NUM_OF_OUT_BITS+1)'(i + 1);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      decoded_number <= '0;
      decode_q       <= 1'b0;
      valid          <= 1'b0;
    end else begin
      decode_q <= decode;
      if (decode) decoded_number <= position;
      valid <= decode && decode_q;
    end
  end
endmodule

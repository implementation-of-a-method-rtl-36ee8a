// full_adder: one bit of the carry-chain delay line.
//
// Sum and carry of a 1-bit full adder: S = A ^ B ^ Cin,
// Cout = (A & B) | (Cin & (A ^ B)). In the delay line A = 0 and B = 1, so the
// carry-in is copied to the carry-out and S = !Cin: a rising edge on the
// carry-in ripples down the chain and turns the sum bits from 1 to 0 one after
// another. CARRY_DELAY_PS is the propagation delay of the carry path of one
// stage; it is a simulation annotation of the physical carry delay (synthesis
// ignores it) so that a simulation of the chain behaves like the real line.
module full_adder #(
  parameter real CARRY_DELAY_PS = 8.59
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  timeunit 1ps;
  timeprecision 10fs;

  assign s = a ^ b ^ cin;
  assign #(CARRY_DELAY_PS) cout = (a & b) | (cin & (a ^ b));
endmodule

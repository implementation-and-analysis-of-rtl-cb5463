// full_adder: one-bit full adder.
// Adds three bits. In a ripple chain ci is the carry from the bit below;
// in a carry-save row it is simply the third operand bit. The gate form
// (xor for the sum, majority for the carry) is this design's choice.
// Purely combinational; no clock, no reset.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule

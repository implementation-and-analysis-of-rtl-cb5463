// half_adder: one-bit half adder.
// Adds two bits: s = a xor b, co = a and b. It is the cell of the
// increment chains and the first cell of the second carry stage in the
// three-operand hybrid adders, where only two bits meet at a position.
// The cell is the standard one the published adders name.
// Purely combinational; no clock, no reset.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule

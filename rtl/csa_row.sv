// csa_row: carry-save row of WIDTH full adders.
// Reduces three operands to two without propagating any carry: each bit
// position adds a[i], b[i] and c[i] on its own, giving a saved sum bit
// s[i] (weight 2^i) and a saved carry bit cy[i] (weight 2^(i+1)), so that
// a + b + c = s + 2*cy. This is the first stage of both three-operand
// hybrid adders. Combinational. One full adder per bit, as published.
module csa_row #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] cy
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(cy[i]));
  end
endmodule

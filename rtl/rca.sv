// rca: WIDTH-bit ripple-carry adder.
// A chain of full adders; the carry out of bit i-1 is the carry in of
// bit i, so the delay grows linearly with WIDTH. Used as the ripple part
// of the skip groups, the hybrid second stages and the latch-select
// groups. Interface: s + 2^WIDTH*co = a + b + ci. Combinational.
// The chain and the default width of 4 are the published ones.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[WIDTH];
endmodule

// carry_incrementer: WIDTH-bit conditional incrementer.
// Adds one carry bit `inc` to the word `a` through a chain of half
// adders: bit i produces s[i] = a[i] xor k[i] and k[i+1] = a[i] and k[i],
// with k[0] = inc. It is the increment circuit of a carry-increment
// adder: a block's sum is computed with carry 0 and then corrected by the
// carry of the block below. Combinational; s + 2^WIDTH*co = a + inc.
// The xor/and chain is the published increment circuit; making the
// increment an input instead of a constant 1 is this design's choice.
module carry_incrementer #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic             inc,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] k;
  assign k[0] = inc;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    half_adder u_ha (.a(a[i]), .b(k[i]), .s(s[i]), .co(k[i+1]));
  end

  assign co = k[WIDTH];
endmodule

// skip_group: one carry-skip (carry-bypass) block of WIDTH bits.
// A ripple chain adds a + b + ci. In parallel each bit's propagate
// condition p[i] = a[i] xor b[i] is formed and all of them are ANDed into
// the group propagate `skip`. When every bit propagates, the group carry
// out equals the carry in and is taken directly from it, bypassing the
// chain. The bypass is combined with an OR, one of the two forms the
// skip logic is described with (the other is a 2:1 mux); both are
// logically the same because the ripple carry equals ci whenever skip=1.
// Combinational; s + 2^WIDTH*co = a + b + ci. The xor propagates, the
// AND and the 4-bit default follow the published skip logic; the skip
// output, brought out for observation, is this design's addition.
module skip_group #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co,
  output logic             skip
);
  logic ripple_co;

  rca #(.WIDTH(WIDTH)) u_rca (.a(a), .b(b), .ci(ci), .s(s), .co(ripple_co));

  assign skip = &(a ^ b);
  assign co   = ripple_co | (skip & ci);
endmodule

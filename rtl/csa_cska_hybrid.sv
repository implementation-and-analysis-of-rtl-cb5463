// csa_cska_hybrid: three-operand adder, carry-save row + carry-skip stage.
//
// Computes sum = a + b + c (WIDTH+2 bits, no carry in). Stage one is a
// carry-save row of WIDTH full adders, one per bit, that turns the three
// operands into a saved-sum vector s and a saved-carry vector cy with
// a + b + c = s + 2*cy. Stage two adds those two vectors:
//   * bit 0 is s[0] directly, nothing else has weight 1;
//   * bit 1 meets only two bits, s[1] and cy[0], so a half adder does it;
//   * the half adder's carry then travels through carry-skip blocks, one
//     per GROUP-bit slice: the rest of the lowest slice (bits 2..GROUP-1)
//     and every higher slice of GROUP bits. A block whose bits all
//     propagate passes its carry in straight to its carry out;
//   * the last block's carry and cy[WIDTH-1] both weigh 2^WIDTH and are
//     added by a final half adder into sum[WIDTH+1:WIDTH].
// The carry-save row, the half adder at bit 1, the skip chain and one skip
// block per 4-bit slice follow the published structure. Adding cy[p-1] to
// every position p, including the low bit of each higher slice with a
// full adder there, and the final half adder, are this design's choices
// that keep the result exact for every input.
//
// Ports: a, b, c operands; sum result; skip[k] is 1 when slice k's
// bypass is active (all its bits propagate). Purely combinational.
module csa_cska_hybrid #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic [WIDTH-1:0]       c,
  output logic [WIDTH+1:0]       sum,
  output logic [WIDTH/GROUP-1:0] skip
);
  localparam int unsigned NG = WIDTH / GROUP;

  if (GROUP < 3 || WIDTH % GROUP != 0) begin : g_bad_size
    $error("csa_cska_hybrid: WIDTH must be a multiple of GROUP and GROUP >= 3");
  end

  logic [WIDTH-1:0] s, cy;
  logic [NG:0]      gc;     // gc[k]: carry out of slice k-1 (weight 2^(k*GROUP))
  logic             h1_co;

  csa_row #(.WIDTH(WIDTH)) u_csa (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  // Lowest slice: bit 0 passes, bit 1 is a half adder, bits 2.. skip.
  assign sum[0] = s[0];
  half_adder u_ha1 (.a(s[1]), .b(cy[0]), .s(sum[1]), .co(h1_co));

  skip_group #(.WIDTH(GROUP-2)) u_skip0 (
    .a(s[GROUP-1:2]), .b(cy[GROUP-2:1]), .ci(h1_co),
    .s(sum[GROUP-1:2]), .co(gc[1]), .skip(skip[0])
  );
  assign gc[0] = 1'b0;

  // Higher slices: one skip block each, chained through gc.
  for (genvar k = 1; k < NG; k++) begin : g_slice
    localparam int unsigned LO = k * GROUP;
    skip_group #(.WIDTH(GROUP)) u_skip (
      .a(s[LO+GROUP-1:LO]), .b(cy[LO+GROUP-2:LO-1]), .ci(gc[k]),
      .s(sum[LO+GROUP-1:LO]), .co(gc[k+1]), .skip(skip[k])
    );
  end

  // Weight 2^WIDTH: slice carry plus the top saved carry.
  half_adder u_ha_top (.a(gc[NG]), .b(cy[WIDTH-1]), .s(sum[WIDTH]), .co(sum[WIDTH+1]));
endmodule

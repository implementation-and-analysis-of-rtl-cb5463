// csa_cia_hybrid: three-operand adder, carry-save row + carry-increment stage.
//
// Computes sum = a + b + c (WIDTH+2 bits, no carry in). Stage one is a
// carry-save row of WIDTH full adders giving a + b + c = s + 2*cy. Stage
// two splits the positions into GROUP-bit slices that all work at once:
//   * slice 0: bit 0 is s[0]; bit 1 is a half adder on s[1], cy[0]; the
//     other bits ripple through full adders. Its sum is final.
//   * slice k >= 1: a half adder on its low bit and full adders above add
//     s and the shifted cy with carry 0, producing a partial sum r and a
//     partial carry g. An increment chain of half adders then adds the
//     carry out of slice k-1 to r. The slice's carry out is g OR the
//     increment chain's carry: the two can never both be 1, since
//     r + 1 <= 2^(GROUP+1) - 1.
//   * the last slice's carry and cy[WIDTH-1] both weigh 2^WIDTH and are
//     added by a final half adder into sum[WIDTH+1:WIDTH].
// So the only carry path across slices is the chain of increment circuits.
// The carry-save row, the half adders, the 4-bit slices and the increment
// circuits follow the published structure; adding cy[p-1] to every
// position p (including each slice's low bit) and the final half adder
// are this design's choices that keep the result exact for every input.
//
// Ports: a, b, c operands; sum result; gco[k] is slice k's carry out,
// i.e. the increment request into slice k+1. Purely combinational.
module csa_cia_hybrid #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic [WIDTH-1:0]       c,
  output logic [WIDTH+1:0]       sum,
  output logic [WIDTH/GROUP-1:0] gco
);
  localparam int unsigned NG = WIDTH / GROUP;

  if (GROUP < 3 || WIDTH % GROUP != 0) begin : g_bad_size
    $error("csa_cia_hybrid: WIDTH must be a multiple of GROUP and GROUP >= 3");
  end

  logic [WIDTH-1:0] s, cy;
  logic [NG:0]      gc;     // gc[k]: carry out of slice k-1 (weight 2^(k*GROUP))
  logic             h1_co;

  csa_row #(.WIDTH(WIDTH)) u_csa (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  // Slice 0.
  assign sum[0] = s[0];
  half_adder u_ha1 (.a(s[1]), .b(cy[0]), .s(sum[1]), .co(h1_co));
  rca #(.WIDTH(GROUP-2)) u_rca0 (
    .a(s[GROUP-1:2]), .b(cy[GROUP-2:1]), .ci(h1_co),
    .s(sum[GROUP-1:2]), .co(gc[1])
  );
  assign gc[0] = 1'b0;

  // Slices 1 .. NG-1: partial add with carry 0, then increment.
  for (genvar k = 1; k < NG; k++) begin : g_slice
    localparam int unsigned LO = k * GROUP;
    logic [GROUP-1:0] r;
    logic             h_co, g, inc_co;

    half_adder u_ha (.a(s[LO]), .b(cy[LO-1]), .s(r[0]), .co(h_co));
    rca #(.WIDTH(GROUP-1)) u_rca (
      .a(s[LO+GROUP-1:LO+1]), .b(cy[LO+GROUP-2:LO]), .ci(h_co),
      .s(r[GROUP-1:1]), .co(g)
    );
    carry_incrementer #(.WIDTH(GROUP)) u_inc (
      .a(r), .inc(gc[k]), .s(sum[LO+GROUP-1:LO]), .co(inc_co)
    );
    assign gc[k+1] = g | inc_co;

    // The OR above is exact only because the two carries exclude each other.
    always_comb begin
      a_carries_exclusive : assert (!(g && inc_co))
        else $error("csa_cia_hybrid: slice %0d ripple and increment carries both set", k);
    end
  end

  half_adder u_ha_top (.a(gc[NG]), .b(cy[WIDTH-1]), .s(sum[WIDTH]), .co(sum[WIDTH+1]));

  assign gco = gc[NG:1];
endmodule

// csla_dlatch: 16-bit carry-select adder built from latch-select slices.
//
// sum + 2^16*cout = a + b + cin. The operand is cut into five slices of
// growing width, square-root style: bits [1:0] are a plain 2-bit RCA fed
// by cin, and slices [3:2], [6:4], [10:7], [15:11] (2, 3, 4 and 5 bits)
// each use one RCA time-shared between carry-in 1 and carry-in 0 through
// D-latches (see latch_select_group). The select carries c1, c3, c6, c10
// hop from mux to mux, so once the slices have finished the carry crosses
// the adder in four mux delays.
// Timing: hold a, b, cin through an en-high phase (the short phase) and
// the following en-low phase; sum/cout are valid in that en-low phase, so
// one addition takes one enable cycle. The slice boundaries follow the
// published 16-bit structure; the latch/mux timing discipline is the
// natural reading of it and is this design's.
module csla_dlatch (
  input  logic        en,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  logic c1, c3, c6, c10;

  rca #(.WIDTH(2)) u_g0 (.a(a[1:0]), .b(b[1:0]), .ci(cin), .s(sum[1:0]), .co(c1));

  latch_select_group #(.WIDTH(2)) u_g1 (
    .en(en), .a(a[3:2]),   .b(b[3:2]),   .sel(c1),  .s(sum[3:2]),   .co(c3));
  latch_select_group #(.WIDTH(3)) u_g2 (
    .en(en), .a(a[6:4]),   .b(b[6:4]),   .sel(c3),  .s(sum[6:4]),   .co(c6));
  latch_select_group #(.WIDTH(4)) u_g3 (
    .en(en), .a(a[10:7]),  .b(b[10:7]),  .sel(c6),  .s(sum[10:7]),  .co(c10));
  latch_select_group #(.WIDTH(5)) u_g4 (
    .en(en), .a(a[15:11]), .b(b[15:11]), .sel(c10), .s(sum[15:11]), .co(cout));
endmodule

// csla_sqrt_mod: 16-bit carry-select adder with a shortened square-root
// slice sequence that needs only three select muxes.
//
// sum + 2^16*cout = a + b (no carry in). Bit 0 is a half adder and bit 1
// a full adder; bits [4:2], [8:5] and [13:9] (3, 4 and 5 bits) are
// latch-select slices (one RCA time-shared between carry-in 1 and 0
// through D-latches, see latch_select_group) selected by C2, C4 and C8;
// bits 14 and 15 are plain full adders rippling from C13 to cout. Compared
// with csla_dlatch the low and high ends are cheap single-bit cells and
// one slice mux is saved.
// Timing: as csla_dlatch; hold a and b through an en-high phase and the
// next en-low phase and read sum/cout during the en-low phase. The cell
// layout follows the published circuit; the timing discipline is the
// natural reading of it and is this design's.
module csla_sqrt_mod (
  input  logic        en,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] sum,
  output logic        cout
);
  logic c1, c2, c4, c8, c13, c14;

  half_adder u_b0 (.a(a[0]), .b(b[0]), .s(sum[0]), .co(c1));
  full_adder u_b1 (.a(a[1]), .b(b[1]), .ci(c1), .s(sum[1]), .co(c2));

  latch_select_group #(.WIDTH(3)) u_g1 (
    .en(en), .a(a[4:2]),  .b(b[4:2]),  .sel(c2), .s(sum[4:2]),  .co(c4));
  latch_select_group #(.WIDTH(4)) u_g2 (
    .en(en), .a(a[8:5]),  .b(b[8:5]),  .sel(c4), .s(sum[8:5]),  .co(c8));
  latch_select_group #(.WIDTH(5)) u_g3 (
    .en(en), .a(a[13:9]), .b(b[13:9]), .sel(c8), .s(sum[13:9]), .co(c13));

  full_adder u_b14 (.a(a[14]), .b(b[14]), .ci(c13), .s(sum[14]), .co(c14));
  full_adder u_b15 (.a(a[15]), .b(b[15]), .ci(c14), .s(sum[15]), .co(cout));
endmodule

// latch_select_group: carry-select slice with one RCA and D-latches.
//
// A classic carry-select slice needs two ripple adders, one assuming carry
// in 0 and one assuming 1. Here a single WIDTH-bit RCA is time-shared: its
// carry in is the enable `en` itself.
//   * en = 1: the RCA adds a + b + 1 and WIDTH+1 transparent D-latches
//     follow its result {carry, sum};
//   * en = 0: the latches hold the carry-in-1 result while the RCA now
//     adds a + b + 0. A mux driven by `sel`, the carry from the slice
//     below, picks the latched result (sel = 1) or the RCA's (sel = 0).
// Timing: a and b must be steady through one en-high phase and the en-low
// phase after it; {co, s} is valid during that en-low phase, once sel has
// settled. During en = 1 both mux inputs are the carry-in-1 result, so the
// output is only meaningful while en = 0. The latches need no reset: each
// en-high phase writes them before they are used.
module latch_select_group #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] now_res;   // {carry, sum} of a + b + en
  logic [WIDTH:0] held;      // {carry, sum} of a + b + 1, latched

  rca #(.WIDTH(WIDTH)) u_rca (
    .a(a), .b(b), .ci(en), .s(now_res[WIDTH-1:0]), .co(now_res[WIDTH])
  );

  always_latch begin
    if (en) held = now_res;
  end

  assign {co, s} = sel ? held : now_res;
endmodule

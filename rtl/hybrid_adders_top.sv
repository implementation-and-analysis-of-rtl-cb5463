// hybrid_adders_top: the four adders of this design side by side.
//
// Two three-operand adders (carry-save row followed by a carry-skip or a
// carry-increment stage) and two two-operand carry-select adders that
// time-share one ripple adder per slice through D-latches. The adders are
// alternatives to one another, not stages of one datapath, so each has
// its own operand and result ports; the two latch-based adders share the
// enable `en`, which acts as their clock (one addition per en cycle, result
// valid while en = 0). The three-operand adders are combinational.
// HYB_WIDTH sets the width of both three-operand adders (a multiple of 4).
module hybrid_adders_top #(
  parameter int unsigned HYB_WIDTH = 8
) (
  // CSA + carry-skip hybrid
  input  logic [HYB_WIDTH-1:0]   cska_a,
  input  logic [HYB_WIDTH-1:0]   cska_b,
  input  logic [HYB_WIDTH-1:0]   cska_c,
  output logic [HYB_WIDTH+1:0]   cska_sum,
  output logic [HYB_WIDTH/4-1:0] cska_skip,
  // CSA + carry-increment hybrid
  input  logic [HYB_WIDTH-1:0]   cia_a,
  input  logic [HYB_WIDTH-1:0]   cia_b,
  input  logic [HYB_WIDTH-1:0]   cia_c,
  output logic [HYB_WIDTH+1:0]   cia_sum,
  output logic [HYB_WIDTH/4-1:0] cia_gco,
  // latch-based carry-select adders
  input  logic                   en,
  input  logic [15:0]            csla_a,
  input  logic [15:0]            csla_b,
  input  logic                   csla_cin,
  output logic [15:0]            csla_sum,
  output logic                   csla_cout,
  input  logic [15:0]            sqrt_a,
  input  logic [15:0]            sqrt_b,
  output logic [15:0]            sqrt_sum,
  output logic                   sqrt_cout
);
  csa_cska_hybrid #(.WIDTH(HYB_WIDTH), .GROUP(4)) u_cska (
    .a(cska_a), .b(cska_b), .c(cska_c), .sum(cska_sum), .skip(cska_skip));

  csa_cia_hybrid #(.WIDTH(HYB_WIDTH), .GROUP(4)) u_cia (
    .a(cia_a), .b(cia_b), .c(cia_c), .sum(cia_sum), .gco(cia_gco));

  csla_dlatch u_csla (
    .en(en), .a(csla_a), .b(csla_b), .cin(csla_cin), .sum(csla_sum), .cout(csla_cout));

  csla_sqrt_mod u_sqrt (
    .en(en), .a(sqrt_a), .b(sqrt_b), .sum(sqrt_sum), .cout(sqrt_cout));
endmodule

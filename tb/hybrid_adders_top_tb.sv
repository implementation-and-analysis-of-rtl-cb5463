// hybrid_adders_top_tb: end-to-end test of the whole adder set at its
// default parameters. Every enable cycle applies fresh operands to all
// four adders at once and, at the end of the en-low phase, compares each
// result with integer addition. It counts, and fails if any never happens:
//   * a carry-skip bypass taken in the CSA + carry-skip hybrid,
//   * an increment chain activated in the CSA + carry-increment hybrid,
//   * a three-operand result that needs its top bit,
//   * a latched (carry-in-1) and a live (carry-in-0) slice result chosen
//     in each latch-based carry-select adder,
//   * one addition per enable cycle in the latch-based adders.
module hybrid_adders_top_tb;
  localparam int unsigned W  = 8;
  localparam int unsigned NG = W / 4;

  logic [W-1:0]  cska_a, cska_b, cska_c, cia_a, cia_b, cia_c;
  logic [W+1:0]  cska_sum, cia_sum;
  logic [NG-1:0] cska_skip, cia_gco;
  logic          en, csla_cin, csla_cout, sqrt_cout;
  logic [15:0]   csla_a, csla_b, csla_sum, sqrt_a, sqrt_b, sqrt_sum;

  int checks = 0, failures = 0, cycles = 0, adds = 0;
  int bypasses = 0, increments = 0, top_bits = 0;
  int csla_latched = 0, csla_live = 0, sqrt_latched = 0, sqrt_live = 0;

  hybrid_adders_top dut (
    .cska_a(cska_a), .cska_b(cska_b), .cska_c(cska_c), .cska_sum(cska_sum), .cska_skip(cska_skip),
    .cia_a(cia_a), .cia_b(cia_b), .cia_c(cia_c), .cia_sum(cia_sum), .cia_gco(cia_gco),
    .en(en),
    .csla_a(csla_a), .csla_b(csla_b), .csla_cin(csla_cin), .csla_sum(csla_sum), .csla_cout(csla_cout),
    .sqrt_a(sqrt_a), .sqrt_b(sqrt_b), .sqrt_sum(sqrt_sum), .sqrt_cout(sqrt_cout)
  );

  always @(posedge en) cycles++;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // carry that arrives at bit `pos` when adding the bits below it
  function automatic bit carry_into(input logic [16:0] x, input logic [16:0] y,
                                    input logic ci, input int unsigned pos);
    logic [17:0] m, low;
    m   = (18'd1 << pos) - 1;
    low = (18'(x) & m) + (18'(y) & m) + 18'(ci);
    return low[pos];
  endfunction

  initial begin
    en = 1'b0;
    #1;
    for (int i = 0; i < 4000; i++) begin
      logic [W+1:0] x, y;
      cska_a = W'($urandom); cska_b = W'($urandom); cska_c = W'($urandom);
      cia_a  = W'($urandom); cia_b  = W'($urandom); cia_c  = W'($urandom);
      csla_a = 16'($urandom); csla_b = 16'($urandom); csla_cin = 1'($urandom);
      sqrt_a = 16'($urandom); sqrt_b = 16'($urandom);
      if (i == 0) begin
        cia_a = '1; cia_b = '1; cia_c = '1;
        sqrt_a = 16'b1001101010111010; sqrt_b = 16'b1001101010111010;
      end
      en = 1'b1; #2;
      en = 1'b0; #6;
      adds++;

      check(cska_sum == (W+2)'(cska_a) + (W+2)'(cska_b) + (W+2)'(cska_c), "CSA-CSkA sum");
      check(cia_sum  == (W+2)'(cia_a)  + (W+2)'(cia_b)  + (W+2)'(cia_c),  "CSA-CIA sum");
      check({csla_cout, csla_sum} == 17'(csla_a) + 17'(csla_b) + 17'(csla_cin), "D-latch CSLA sum");
      check({sqrt_cout, sqrt_sum} == 17'(sqrt_a) + 17'(sqrt_b), "modified-sqrt CSLA sum");

      // carry-skip: bypass taken when a slice propagates and its carry in is 1
      x = {2'b00, cska_a ^ cska_b ^ cska_c};
      y = {1'b0, (cska_a & cska_b) | (cska_a & cska_c) | (cska_b & cska_c), 1'b0};
      for (int k = 0; k < NG; k++)
        if (cska_skip[k] && carry_into(17'(x), 17'(y), 1'b0, (k == 0) ? 2 : k * 4)) bypasses++;
      // carry-increment: a slice below the top hands a carry up
      for (int k = 0; k + 1 < NG; k++)
        if (cia_gco[k]) increments++;
      if (cia_sum[W+1] || cska_sum[W+1]) top_bits++;
      // carry-select: which mux path each slice took
      foreach (SEL_CSLA[g])
        if (carry_into(17'(csla_a), 17'(csla_b), csla_cin, SEL_CSLA[g])) csla_latched++; else csla_live++;
      foreach (SEL_SQRT[g])
        if (carry_into(17'(sqrt_a), 17'(sqrt_b), 1'b0, SEL_SQRT[g])) sqrt_latched++; else sqrt_live++;
    end

    check(cycles == adds, "one addition per enable cycle");
    check(bypasses > 0, "carry-skip bypass never taken");
    check(increments > 0, "increment chain never used");
    check(top_bits > 0, "three-operand top bit never set");
    check(csla_latched > 0 && csla_live > 0, "D-latch CSLA mux paths");
    check(sqrt_latched > 0 && sqrt_live > 0, "modified-sqrt CSLA mux paths");
    $display("additions=%0d enable_cycles=%0d bypasses=%0d increments=%0d top_bits=%0d",
             adds, cycles, bypasses, increments, top_bits);
    $display("csla latched/live=%0d/%0d sqrt latched/live=%0d/%0d",
             csla_latched, csla_live, sqrt_latched, sqrt_live);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned SEL_CSLA [4] = '{2, 4, 7, 11};   // c1, c3, c6, c10
  localparam int unsigned SEL_SQRT [3] = '{2, 5, 9};       // C2, C4, C8
endmodule

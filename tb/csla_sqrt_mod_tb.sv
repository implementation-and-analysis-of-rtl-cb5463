// csla_sqrt_mod_tb: the 16-bit carry-select adder with three latch-select
// slices, one addition per enable cycle. Operands: the vector
// a = b = 1001101010111010 (sum 0011010101110100, carry 1), all-ones
// cases, then random; each result is compared with a + b at the end of the
// en-low phase. The test counts en cycles against additions and requires
// the select carries C2, C4, C8 to take both mux paths.
module csla_sqrt_mod_tb;
  logic        en, cout;
  logic [15:0] a, b, sum;
  int checks = 0, failures = 0, cycles = 0, adds = 0;
  int sel_one [3], sel_zero [3];
  localparam int unsigned SEL_BIT [3] = '{2, 5, 9};   // C2, C4, C8

  csla_sqrt_mod dut (.en(en), .a(a), .b(b), .sum(sum), .cout(cout));

  always @(posedge en) cycles++;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_once(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] exp;
    a = x; b = y;
    en = 1'b1; #2;
    en = 1'b0; #6;
    adds++;
    exp = 17'(x) + 17'(y);
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %h+%h -> %b_%h, expected %h", x, y, cout, sum, exp);
    end
    for (int g = 0; g < 3; g++) begin
      logic [16:0] m, low;
      m   = (17'd1 << SEL_BIT[g]) - 1;
      low = (17'(x) & m) + (17'(y) & m);
      if (low[SEL_BIT[g]]) sel_one[g]++; else sel_zero[g]++;
    end
  endtask

  initial begin
    en = 1'b0;
    for (int g = 0; g < 3; g++) begin sel_one[g] = 0; sel_zero[g] = 0; end
    #1;
    add_once(16'b1001101010111010, 16'b1001101010111010);
    checks++;
    if (sum != 16'b0011010101110100 || cout != 1'b1) begin
      failures++;
      $display("FAIL reference vector: %b %b", cout, sum);
    end
    add_once(16'hFFFF, 16'h0001);
    add_once(16'hFFFF, 16'hFFFF);
    add_once(16'h7FFF, 16'h0001);
    add_once(16'h0000, 16'h0000);
    for (int i = 0; i < 3000; i++)
      add_once(16'($urandom), 16'($urandom));
    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d enable cycles for %0d additions", cycles, adds);
    end
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (sel_one[g] == 0 || sel_zero[g] == 0) begin
        failures++;
        $display("FAIL select %0d never took one of its paths", g);
      end
    end
    $display("csla_sqrt_mod_tb: %0d additions in %0d enable cycles", adds, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

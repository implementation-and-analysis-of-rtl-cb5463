// csla_dlatch_tb: the 16-bit latch-based carry-select adder, one addition
// per enable cycle. Operands: the worked example 1100 + 1001, the vector
// a = b = 1001101010111010 with cin = 0 (sum 0011010101110100, carry 1),
// all-ones cases, then random. Each result is compared with a + b + cin at
// the end of the en-low phase. The test counts the en cycles against the
// additions (one each) and requires every select carry c1, c3, c6, c10 to
// pick both the latched (1) and the live (0) result at least once.
module csla_dlatch_tb;
  logic        en, cin, cout;
  logic [15:0] a, b, sum;
  int checks = 0, failures = 0, cycles = 0, adds = 0;
  int sel_one [4], sel_zero [4];
  localparam int unsigned SEL_BIT [4] = '{2, 4, 7, 11};   // c1, c3, c6, c10

  csla_dlatch dut (.en(en), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always @(posedge en) cycles++;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_once(input logic [15:0] x, input logic [15:0] y, input logic ci);
    logic [16:0] exp;
    a = x; b = y; cin = ci;
    en = 1'b1; #2;
    en = 1'b0; #6;
    adds++;
    exp = 17'(x) + 17'(y) + 17'(ci);
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %h+%h+%b -> %b_%h, expected %h", x, y, ci, cout, sum, exp);
    end
    for (int g = 0; g < 4; g++) begin
      logic [16:0] m, low;
      m   = (17'd1 << SEL_BIT[g]) - 1;
      low = (17'(x) & m) + (17'(y) & m) + 17'(ci);
      if (low[SEL_BIT[g]]) sel_one[g]++; else sel_zero[g]++;
    end
  endtask

  initial begin
    en = 1'b0;
    for (int g = 0; g < 4; g++) begin sel_one[g] = 0; sel_zero[g] = 0; end
    #1;
    add_once(16'h000C, 16'h0009, 1'b0);
    add_once(16'b1001101010111010, 16'b1001101010111010, 1'b0);
    checks++;
    if (sum != 16'b0011010101110100 || cout != 1'b1) begin
      failures++;
      $display("FAIL reference vector: %b %b", cout, sum);
    end
    add_once(16'hFFFF, 16'h0000, 1'b1);
    add_once(16'hFFFF, 16'hFFFF, 1'b1);
    add_once(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 3000; i++)
      add_once(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d enable cycles for %0d additions", cycles, adds);
    end
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (sel_one[g] == 0 || sel_zero[g] == 0) begin
        failures++;
        $display("FAIL select %0d never took one of its paths", g);
      end
    end
    $display("csla_dlatch_tb: %0d additions in %0d enable cycles", adds, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// carry_incrementer_tb: the 4-bit incrementer checked exhaustively, and a
// 12-bit instance on random words, against a + inc.
module carry_incrementer_tb;
  logic [3:0]  a, s;
  logic        inc, co;
  logic [11:0] a12, s12;
  logic        inc12, co12;
  int checks = 0, failures = 0;

  carry_incrementer dut (.a(a), .inc(inc), .s(s), .co(co));
  carry_incrementer #(.WIDTH(12)) dut12 (.a(a12), .inc(inc12), .s(s12), .co(co12));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {inc, a} = 5'(i);
      #1;
      checks++;
      if ({co, s} != 5'(a) + 5'(inc)) begin
        failures++;
        $display("FAIL %h+%b -> co=%b s=%h", a, inc, co, s);
      end
    end
    for (int i = 0; i < 500; i++) begin
      a12 = 12'($urandom); inc12 = 1'($urandom);
      if (i == 0) begin a12 = 12'hFFF; inc12 = 1'b1; end
      #1;
      checks++;
      if ({co12, s12} != 13'(a12) + 13'(inc12)) begin
        failures++;
        $display("FAIL %h+%b -> co=%b s=%h", a12, inc12, co12, s12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

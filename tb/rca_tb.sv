// rca_tb: the 4-bit ripple-carry adder checked exhaustively, including the
// worked example 1100 + 1001 = 1_0101, and a 16-bit instance checked on
// random operands, all against integer addition.
module rca_tb;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  int checks = 0, failures = 0;

  rca dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  rca #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .ci(ci16), .s(s16), .co(co16));

  task automatic check4(input logic [4:0] exp);
    checks++;
    if ({co4, s4} != exp) begin
      failures++;
      $display("FAIL 4-bit %h+%h+%b -> %h, expected %h", a4, b4, ci4, {co4, s4}, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = 4'b1100; b4 = 4'b1001; ci4 = 1'b0;
    #1 check4(5'b10101);
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1 check4(5'(a4) + 5'(b4) + 5'(ci4));
    end
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      if (i == 0) begin a16 = 16'hFFFF; b16 = 16'h0000; ci16 = 1'b1; end
      #1;
      checks++;
      if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(ci16)) begin
        failures++;
        $display("FAIL 16-bit %h+%h+%b -> %h", a16, b16, ci16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

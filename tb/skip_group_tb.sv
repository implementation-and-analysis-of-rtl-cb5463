// skip_group_tb: the 4-bit carry-skip block checked exhaustively. The sum
// and carry must equal a + b + ci, and `skip` must be 1 exactly when every
// bit pair differs. The bypass case (skip = 1 with ci = 1) must occur.
module skip_group_tb;
  logic [3:0] a, b, s;
  logic       ci, co, skip;
  int checks = 0, failures = 0, bypasses = 0;

  skip_group dut (.a(a), .b(b), .ci(ci), .s(s), .co(co), .skip(skip));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic all_prop;
      {ci, a, b} = 9'(i);
      #1;
      all_prop = (a == ~b);
      checks++;
      if ({co, s} != 5'(a) + 5'(b) + 5'(ci) || skip != all_prop) begin
        failures++;
        $display("FAIL %h+%h+%b -> co=%b s=%h skip=%b", a, b, ci, co, s, skip);
      end
      if (all_prop && ci) bypasses++;
    end
    checks++;
    if (bypasses == 0) begin
      failures++;
      $display("FAIL bypass never exercised");
    end
    $display("skip_group_tb: bypass cases %0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

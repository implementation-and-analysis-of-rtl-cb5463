// latch_select_group_tb: the latch-select slice at its default 2-bit width
// (exhaustive) and at 5 bits (random). Each addition is one enable cycle:
// operands applied, a short en-high phase, then an en-low phase at whose
// end {co, s} must equal a + b + sel. A second check changes the operands
// during the en-low phase with sel = 1: the latched carry-in-1 result must
// not follow them.
module latch_select_group_tb;
  logic       en;
  logic [1:0] a2, b2, s2;
  logic       sel2, co2;
  logic [4:0] a5, b5, s5;
  logic       sel5, co5;
  int checks = 0, failures = 0;

  latch_select_group dut2 (.en(en), .a(a2), .b(b2), .sel(sel2), .s(s2), .co(co2));
  latch_select_group #(.WIDTH(5)) dut5 (.en(en), .a(a5), .b(b5), .sel(sel5), .s(s5), .co(co5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one enable cycle: short high phase, longer low phase
  task automatic en_cycle();
    en = 1'b1; #2;
    en = 1'b0; #6;
  endtask

  initial begin
    en = 1'b0;
    a5 = '0; b5 = '0; sel5 = 1'b0;
    for (int i = 0; i < 32; i++) begin
      {sel2, a2, b2} = 5'(i);
      a5 = 5'($urandom); b5 = 5'($urandom); sel5 = 1'($urandom);
      en_cycle();
      checks++;
      if ({co2, s2} != 3'(a2) + 3'(b2) + 3'(sel2)) begin
        failures++;
        $display("FAIL W2 %h+%h sel=%b -> %b%h", a2, b2, sel2, co2, s2);
      end
      checks++;
      if ({co5, s5} != 6'(a5) + 6'(b5) + 6'(sel5)) begin
        failures++;
        $display("FAIL W5 %h+%h sel=%b -> %b%h", a5, b5, sel5, co5, s5);
      end
    end
    // latch must hold its carry-in-1 result while en = 0
    for (int i = 0; i < 16; i++) begin
      logic [1:0] a_old, b_old;
      {a2, b2} = 4'(i); sel2 = 1'b1;
      a_old = a2; b_old = b2;
      en_cycle();
      a2 = ~a_old; b2 = b_old ^ 2'b01;
      #1;
      checks++;
      if ({co2, s2} != 3'(a_old) + 3'(b_old) + 3'd1) begin
        failures++;
        $display("FAIL hold: latched %b%h, expected %h", co2, s2, 3'(a_old) + 3'(b_old) + 3'd1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

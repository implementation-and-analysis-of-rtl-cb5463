// csa_row_tb: the 8-bit carry-save row on random and corner operands.
// Each saved-sum bit must be the parity and each saved-carry bit the
// majority of the three operand bits, and s + 2*cy must equal a + b + c.
module csa_row_tb;
  logic [7:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa_row dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      if (i == 0) begin a = 8'hFF; b = 8'hFF; c = 8'hFF; end
      if (i == 1) begin a = 8'h00; b = 8'h00; c = 8'h00; end
      #1;
      for (int k = 0; k < 8; k++) begin
        int n;
        n = int'(a[k]) + int'(b[k]) + int'(c[k]);
        checks++;
        if (s[k] != n[0] || cy[k] != n[1]) begin
          failures++;
          $display("FAIL bit %0d: %b%b%b -> s=%b cy=%b", k, a[k], b[k], c[k], s[k], cy[k]);
        end
      end
      checks++;
      if (10'(s) + (10'(cy) << 1) != 10'(a) + 10'(b) + 10'(c)) begin
        failures++;
        $display("FAIL total %h %h %h", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

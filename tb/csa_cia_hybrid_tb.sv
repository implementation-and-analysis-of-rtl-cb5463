// csa_cia_hybrid_tb: checks the CSA + carry-increment hybrid at its
// default 8-bit width and at 16, 32 and 64 bits. Every sum is compared
// with integer addition and every slice carry with the recomputed carry.
// Fails if some width never exercises an increment chain or the top bit.
module csa_cia_hybrid_tb;
  int   chk [4], fl [4], inc [4], top [4];
  logic dn  [4];
  int checks = 0, failures = 0;

  cia_check #(.W(8),  .N(40000)) u_w8  (.checks(chk[0]), .failures(fl[0]), .increments(inc[0]), .top_bits(top[0]), .done(dn[0]));
  cia_check #(.W(16), .N(20000)) u_w16 (.checks(chk[1]), .failures(fl[1]), .increments(inc[1]), .top_bits(top[1]), .done(dn[1]));
  cia_check #(.W(32), .N(20000)) u_w32 (.checks(chk[2]), .failures(fl[2]), .increments(inc[2]), .top_bits(top[2]), .done(dn[2]));
  cia_check #(.W(64), .N(20000)) u_w64 (.checks(chk[3]), .failures(fl[3]), .increments(inc[3]), .top_bits(top[3]), .done(dn[3]));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    for (int i = 0; i < 4; i++) begin
      checks   += chk[i] + 1;
      failures += fl[i];
      $display("width %0d: checks=%0d failures=%0d increments=%0d top_bits=%0d",
               8 << i, chk[i], fl[i], inc[i], top[i]);
      if (inc[i] == 0 || top[i] == 0) begin
        failures++;
        $display("FAIL width %0d: increment chain or top bit never exercised", 8 << i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

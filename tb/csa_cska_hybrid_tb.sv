// csa_cska_hybrid_tb: checks the CSA + carry-skip hybrid at its default
// 8-bit width and at 16, 32 and 64 bits, the widths it is compared at.
// Every sum is compared with integer addition and every slice's skip flag
// with the recomputed propagate condition. Fails if a bypass is never
// taken at some width.
module csa_cska_hybrid_tb;
  int   chk [4], fl [4], byp [4];
  logic dn  [4];
  int checks = 0, failures = 0;

  cska_check #(.W(8),  .N(40000)) u_w8  (.checks(chk[0]), .failures(fl[0]), .bypasses(byp[0]), .done(dn[0]));
  cska_check #(.W(16), .N(20000)) u_w16 (.checks(chk[1]), .failures(fl[1]), .bypasses(byp[1]), .done(dn[1]));
  cska_check #(.W(32), .N(20000)) u_w32 (.checks(chk[2]), .failures(fl[2]), .bypasses(byp[2]), .done(dn[2]));
  cska_check #(.W(64), .N(20000)) u_w64 (.checks(chk[3]), .failures(fl[3]), .bypasses(byp[3]), .done(dn[3]));

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
      $display("width %0d: checks=%0d failures=%0d bypasses=%0d", 8 << i, chk[i], fl[i], byp[i]);
      if (byp[i] == 0) begin
        failures++;
        $display("FAIL width %0d: no bypass taken", 8 << i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

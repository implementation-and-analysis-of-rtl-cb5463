// cska_check: drives one csa_cska_hybrid instance of width W with N
// operand triples (corner patterns first, then random) and compares the
// sum with integer addition and each slice's skip flag with the
// all-propagate condition recomputed from the operands. Counts how often a
// bypass is actually taken (skip = 1 while the slice's carry in is 1).
// Results are reported on its output ports once `done` rises.
module cska_check #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 20000
) (
  output int   checks,
  output int   failures,
  output int   bypasses,
  output logic done
);
  localparam int unsigned G  = 4;
  localparam int unsigned NG = W / G;

  logic [W-1:0]  a, b, c;
  logic [W+1:0]  sum;
  logic [NG-1:0] skip;

  csa_cska_hybrid #(.WIDTH(W), .GROUP(G)) dut (.a(a), .b(b), .c(c), .sum(sum), .skip(skip));

  function automatic logic [W-1:0] pattern(int unsigned sel);
    case (sel % 4)
      0: return '0;
      1: return '1;
      2: return {(W/2){2'b01}};
      default: return {(W/2){2'b10}};
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; bypasses = 0; done = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      logic [W+1:0] x, y, pv, m, low;
      logic [W+1:0] expected;
      if (i < 64) begin
        a = pattern(i); b = pattern(i / 4); c = pattern(i / 16);
      end else begin
        a = W'({$urandom, $urandom}); b = W'({$urandom, $urandom}); c = W'({$urandom, $urandom});
      end
      #1;
      expected = (W+2)'(a) + (W+2)'(b) + (W+2)'(c);
      checks++;
      if (sum != expected) begin
        failures++;
        $display("FAIL W=%0d %h+%h+%h -> %h, expected %h", W, a, b, c, sum, expected);
      end
      // saved sum / saved carry of the carry-save row, carry moved up one place
      x  = {2'b00, a ^ b ^ c};
      y  = {1'b0, (a & b) | (a & c) | (b & c), 1'b0};
      pv = x ^ y;
      for (int unsigned k = 0; k < NG; k++) begin
        int unsigned lo;
        logic        all_p, cin_k;
        lo = (k == 0) ? 2 : k * G;
        all_p = 1'b1;
        for (int unsigned p = lo; p < (k + 1) * G; p++) all_p &= pv[p];
        m     = ((W+2)'(1) << lo) - 1;
        low   = (x & m) + (y & m);
        cin_k = low[lo];
        checks++;
        if (skip[k] != all_p) begin
          failures++;
          $display("FAIL W=%0d slice %0d skip=%b expected %b", W, k, skip[k], all_p);
        end
        if (all_p && cin_k) bypasses++;
      end
    end
    done = 1'b1;
  end
endmodule

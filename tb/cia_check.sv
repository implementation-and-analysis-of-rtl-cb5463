// cia_check: drives one csa_cia_hybrid instance of width W with N operand
// triples (corner patterns first, then random) and compares the sum with
// integer addition and each slice's carry out with the carry into that
// position recomputed from the operands. Counts increment-chain
// activations (a slice below the top passing a carry up) and results that
// need the top bit (sum[W+1] = 1).
module cia_check #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 20000
) (
  output int   checks,
  output int   failures,
  output int   increments,
  output int   top_bits,
  output logic done
);
  localparam int unsigned G  = 4;
  localparam int unsigned NG = W / G;

  logic [W-1:0]  a, b, c;
  logic [W+1:0]  sum;
  logic [NG-1:0] gco;

  csa_cia_hybrid #(.WIDTH(W), .GROUP(G)) dut (.a(a), .b(b), .c(c), .sum(sum), .gco(gco));

  function automatic logic [W-1:0] pattern(int unsigned sel);
    case (sel % 4)
      0: return '0;
      1: return '1;
      2: return {(W/2){2'b01}};
      default: return {(W/2){2'b10}};
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; increments = 0; top_bits = 0; done = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      logic [W+1:0] x, y, m, low;
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
      if (sum[W+1]) top_bits++;
      x = {2'b00, a ^ b ^ c};
      y = {1'b0, (a & b) | (a & c) | (b & c), 1'b0};
      for (int unsigned k = 0; k < NG; k++) begin
        int unsigned hi;
        hi  = (k + 1) * G;
        m   = ((W+2)'(1) << hi) - 1;
        low = (x & m) + (y & m);
        checks++;
        if (gco[k] != low[hi]) begin
          failures++;
          $display("FAIL W=%0d slice %0d carry=%b expected %b", W, k, gco[k], low[hi]);
        end
        if (k + 1 < NG && gco[k]) increments++;
      end
    end
    done = 1'b1;
  end
endmodule

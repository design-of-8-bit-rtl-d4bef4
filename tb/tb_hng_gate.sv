// Exhaustive test of the HNG gate. For all 16 inputs, P = A and Q = B are
// checked. R is checked as the sum bit and S as the carry of A + B + C, with
// the carry XORed with D, all computed arithmetically here. The test also
// checks reversibility: the 16 inputs give 16 different outputs.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  logic [1:0] fa;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      fa = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if (p !== a || q !== b || r !== fa[0] || s !== (fa[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin failures++; $display("FAIL not reversible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

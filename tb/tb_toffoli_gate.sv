// Exhaustive test of the Toffoli gate. All eight inputs are checked against
// P = A, Q = B, R = C xor (A and B),
// computed here by independent expressions. The test also checks that the
// gate is reversible: the eight inputs give eight different outputs.
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  logic exp_q, exp_r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp_q = b; exp_r = c ^ (a && b);
      checks++;
      if (p !== a || q !== exp_q || r !== exp_r) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin failures++; $display("FAIL not reversible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Exhaustive test of the Feynman gate: every input pair is checked against
// P = A and Q = A xor B. The test also checks that the gate is reversible: the
// four input pairs give four different outputs.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin failures++; $display("FAIL not reversible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

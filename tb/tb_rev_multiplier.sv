// Exhaustive test of the 8x8 multiplier: all 65536 operand pairs are compared
// with the product computed in the testbench.
module tb_rev_multiplier;
  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic [15:0] prod;

  rev_multiplier #(.W(8)) dut (.a(a), .b(b), .prod(prod));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a = i[7:0]; b = i[15:8];
      #1;
      checks++;
      if (prod !== 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d -> %0d", a, b, prod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

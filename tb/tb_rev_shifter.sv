// Exhaustive test of the one-bit shifter: every 8-bit value is shifted left
// and right and compared with the shift operators.
module tb_rev_shifter;
  int checks = 0, failures = 0;
  logic [7:0] a, y;
  logic right;

  rev_shifter #(.W(8)) dut (.a(a), .right(right), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      a = i[7:0]; right = i[8];
      #1;
      checks++;
      if (y !== (right ? a >> 1 : a << 1)) begin
        failures++;
        $display("FAIL a=%b right=%b -> %b", a, right, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

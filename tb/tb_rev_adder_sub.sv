// Exhaustive test of the 8-bit adder/subtractor: all 65536 operand pairs, for
// A+B with carry-in 0 and 1, and for A-B. Sum, carry out and signed overflow
// are checked against integer arithmetic done in the testbench.
module tb_rev_adder_sub;
  int checks = 0, failures = 0;
  logic [7:0] a, b, sum;
  logic sub, cin, cout, ovf;
  logic [8:0] ref9;
  int sres;
  logic ref_ovf;

  rev_adder_sub #(.W(8)) dut (.a(a), .b(b), .sub(sub), .cin(cin), .sum(sum), .cout(cout), .ovf(ovf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mode = 0; mode < 3; mode++) begin
      for (int i = 0; i < 65536; i++) begin
        a = i[7:0]; b = i[15:8];
        sub = (mode == 2); cin = (mode == 1);
        #1;
        if (sub) begin
          ref9 = {1'b0, a} + {1'b0, ~b} + 9'd1;        // carry = no borrow
          sres = $signed(a) - $signed(b);
        end else begin
          ref9 = {1'b0, a} + {1'b0, b} + 9'(cin);
          sres = $signed(a) + $signed(b) + int'(cin);
        end
        ref_ovf = (sres > 127) || (sres < -128);
        checks++;
        if (sum !== ref9[7:0] || cout !== ref9[8] || ovf !== ref_ovf) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode=%0d a=%0d b=%0d -> sum=%0d cout=%b ovf=%b", mode, a, b, sum, cout, ovf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

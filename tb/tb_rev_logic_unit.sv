// Test of the logic unit. For each of its eight codes, 300 random operand
// pairs are compared with the SystemVerilog bitwise operators.
module tb_rev_logic_unit;
  int checks = 0, failures = 0;
  logic [7:0] a, b, y, r;
  logic [2:0] op;

  rev_logic_unit #(.W(8)) dut (.a(a), .b(b), .op(op), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++) begin
      for (int n = 0; n < 300; n++) begin
        a = 8'($urandom); b = 8'($urandom); op = 3'(o);
        #1;
        case (o)
          0: r = a | b;
          1: r = a & b;
          2: r = ~a;
          3: r = a ^ b;
          4: r = ~(a | b);
          5: r = ~(a & b);
          6: r = ~(a ^ b);
          default: r = 8'hFF;
        endcase
        checks++;
        if (y !== r) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d a=%h b=%h -> %h exp %h", o, a, b, y, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

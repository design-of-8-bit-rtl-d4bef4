// Exhaustive test of the instruction decoder. For every device ID and every
// LOAD/ENABLE pair, ctrl1 must be 1 << k when l is high and zero when l is
// low; ctrl2 must do the same for e. With l = e = 1, k = 000..111 gives
// 00000001..10000000 on both outputs.
module tb_instruction_decoder;
  int checks = 0, failures = 0;
  logic l, e;
  logic [2:0] k;
  logic [7:0] ctrl1, ctrl2;

  instruction_decoder dut (.l(l), .e(e), .k(k), .ctrl1(ctrl1), .ctrl2(ctrl2));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {l, e, k} = 5'(v);
      #1;
      checks++;
      if (ctrl1 !== (l ? 8'(1) << k : 8'h00) || ctrl2 !== (e ? 8'(1) << k : 8'h00)) begin
        failures++;
        $display("FAIL l=%b e=%b k=%b -> %b %b", l, e, k, ctrl1, ctrl2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

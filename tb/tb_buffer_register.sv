// Test of the controlled buffer register over 400 random cycles. A model
// register in the testbench follows load and reset. The test checks that q
// always equals the model, and that dout equals the model when enable is high
// and zero when it is low.
module tb_buffer_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst, load, enable;
  logic [7:0] din, q, dout, model;

  buffer_register #(.W(8)) dut (.clk(clk), .rst(rst), .load(load), .enable(enable), .din(din), .q(q), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; enable = 0; din = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    for (int n = 0; n < 400; n++) begin
      load = 1'($urandom); enable = 1'($urandom); din = 8'($urandom);
      rst = ($urandom % 50) == 0;
      #1;
      checks++;
      if (q !== model || dout !== (enable ? model : 8'h00)) begin
        failures++;
        $display("FAIL n=%0d q=%h dout=%h model=%h en=%b", n, q, dout, model, enable);
      end
      @(posedge clk);
      if (rst) model = 0; else if (load) model = din;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

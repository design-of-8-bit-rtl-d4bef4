// Test of the program counter over 600 random cycles, including the wrap from
// 255 to 0. A model counter in the testbench applies reset, then load, then
// increment, in that priority. The test checks that q equals the model, and
// that dout equals the model when enable is high and zero when it is low.
module tb_program_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst, inc, load, enable;
  logic [7:0] din, q, dout, model;

  program_counter #(.W(8)) dut (.clk(clk), .rst(rst), .inc(inc), .load(load), .enable(enable), .din(din), .q(q), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; inc = 0; load = 0; enable = 0; din = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    for (int n = 0; n < 600; n++) begin
      inc = 1'($urandom); load = ($urandom % 8) == 0; enable = 1'($urandom);
      din = (n == 100) ? 8'hFE : 8'($urandom);
      if (n > 100 && n < 110) begin load = 0; inc = 1; end   // count through 255 -> 0
      rst = ($urandom % 100) == 0;
      #1;
      checks++;
      if (q !== model || dout !== (enable ? model : 8'h00)) begin
        failures++;
        $display("FAIL n=%0d q=%h dout=%h model=%h", n, q, dout, model);
      end
      @(posedge clk);
      if (rst) model = 0; else if (load) model = din; else if (inc) model = model + 1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

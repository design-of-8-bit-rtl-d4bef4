// Test of the 16 x 8 register file.
// First, 10101011 is written to register 0 and 10101010 to register 1, and
// both are read back. The decoder outputs must be 0000000000000001 and
// 0000000000000010 during these accesses. Then 600 random cycles of load and
// enable run against an array model in the testbench. The checks are: dout is
// the addressed register when e is high and zero when e is low; ctrl1 and
// ctrl2 are one-hot for the address or zero; and a read in the same cycle as
// a write returns the old value.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst, l, e;
  logic [3:0] s;
  logic [7:0] din, dout;
  logic [15:0] ctrl1, ctrl2;
  logic [7:0] model [16];

  register_file #(.W(8), .N(4)) dut (.clk(clk), .rst(rst), .l(l), .e(e), .s(s), .din(din),
                                     .dout(dout), .ctrl1(ctrl1), .ctrl2(ctrl2));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    logic [7:0] ed;
    ed = e ? model[s] : 8'h00;
    checks++;
    if (dout !== ed || ctrl1 !== (l ? 16'(1) << s : 16'h0) || ctrl2 !== (e ? 16'(1) << s : 16'h0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL s=%0d l=%b e=%b dout=%h exp %h ctrl1=%b ctrl2=%b", s, l, e, dout, ed, ctrl1, ctrl2);
    end
  endtask

  task automatic step();
    #1; cmp();
    @(posedge clk);
    if (rst) foreach (model[k]) model[k] = 0;
    else if (l) model[s] = din;
    #1;
  endtask

  initial begin
    rst = 1; l = 0; e = 0; s = 0; din = 0;
    foreach (model[k]) model[k] = 0;
    @(posedge clk); #1;
    rst = 0;
    // Write 0xAB to register 0 and 0xAA to register 1, then read both back.
    l = 1; e = 0; s = 4'd0; din = 8'b10101011; step();
    checks++; if (ctrl1 !== 16'b0000000000000001) failures++;
    l = 1; e = 0; s = 4'd1; din = 8'b10101010; step();
    l = 0; e = 1; s = 4'd0; #1;
    checks++; if (dout !== 8'b10101011) begin failures++; $display("FAIL read r0 %b", dout); end
    step();
    l = 0; e = 1; s = 4'd1; #1;
    checks++; if (dout !== 8'b10101010 || ctrl2 !== 16'b0000000000000010) begin failures++; $display("FAIL read r1 %b", dout); end
    step();
    for (int n = 0; n < 600; n++) begin
      l = 1'($urandom); e = 1'($urandom); s = 4'($urandom); din = 8'($urandom);
      rst = ($urandom % 200) == 0;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test of the timing and control unit. After reset the unit must be in a
// fetch cycle. fetch must then alternate on every clock, so each instruction
// takes exactly two cycles. In fetch cycles no strobe may be active. In
// execute cycles the LOAD and ENABLE strobes must be 1 << device ID, gated by
// the instruction's LOAD and ENABLE bits. arg and cin must be the
// instruction's bits 3:0 and 4. A new random instruction is applied at every
// fetch, 300 times.
module tb_control_unit;
  import rev_proc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, fetch, cin;
  instr_t ir;
  logic [7:0] ls, es;
  logic [3:0] arg;
  int fetch_cycles = 0, exec_cycles = 0;

  control_unit dut (.clk(clk), .rst(rst), .ir(ir), .fetch(fetch), .load_strobe(ls),
                    .enable_strobe(es), .arg(arg), .cin(cin));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ir = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      // fetch cycle
      ir = instr_t'(10'($urandom));
      #1;
      checks++;
      if (!fetch || ls !== 0 || es !== 0) begin failures++; $display("FAIL fetch n=%0d", n); end
      fetch_cycles++;
      @(posedge clk); #1;
      // execute cycle
      checks++;
      if (fetch || ls !== (ir.load ? 8'(1) << ir.dev : 8'h0) || es !== (ir.enable ? 8'(1) << ir.dev : 8'h0) ||
          arg !== ir.arg || cin !== ir.cin) begin
        failures++;
        $display("FAIL exec n=%0d ir=%b ls=%b es=%b", n, ir, ls, es);
      end
      exec_cycles++;
      @(posedge clk); #1;
    end
    checks++;
    if (fetch_cycles != 300 || exec_cycles != 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test of the 16-operation ALU.
// Part 1 applies a = 4 and b = 3 with select 0000..0111 and expects the low
// byte x to be 0, 7, 1, 12, 5, 4, 8, 2 (clear, add, subtract, multiply,
// increment, pass, left shift, right shift).
// Part 2 runs 200 random operand sets through each of the 16 operations. It
// checks x, y, cout and the four flags against a reference model written here
// with integer arithmetic.
module tb_alu;
  import rev_proc_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, b, x, y, ex, ey;
  logic [3:0] sel;
  logic cin, cout, ec, ev;
  flags_t flags;
  int s;

  alu #(.W(8)) dut (.a(a), .b(b), .cin(cin), .sel(sel), .x(x), .y(y), .cout(cout), .flags(flags));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reference();
    logic [15:0] p;
    logic [8:0] t;
    ex = '0; ey = '0; ec = 0; ev = 0;
    case (sel)
      4'b0000: ex = 0;
      4'b0001: begin t = a + b + cin; ex = t[7:0]; ec = t[8];
                     s = $signed(a) + $signed(b) + int'(cin); ev = s > 127 || s < -128; end
      4'b0010: begin t = {1'b0, a} + {1'b0, ~b} + 9'd1; ex = t[7:0]; ec = t[8];
                     s = $signed(a) - $signed(b); ev = s > 127 || s < -128; end
      4'b0011: begin p = a * b; {ey, ex} = p; end
      4'b0100: begin t = a + 9'd1; ex = t[7:0]; ec = t[8]; ev = (a == 8'h7F); end
      4'b0101: ex = a;
      4'b0110: ex = a << 1;
      4'b0111: ex = a >> 1;
      4'b1000: ex = a | b;
      4'b1001: ex = a & b;
      4'b1010: ex = ~a;
      4'b1011: ex = a ^ b;
      4'b1100: ex = ~(a | b);
      4'b1101: ex = ~(a & b);
      4'b1110: ex = ~(a ^ b);
      default: begin ex = 8'hFF; ey = 8'hFF; end
    endcase
  endtask

  task automatic check(string tag);
    reference();
    checks++;
    if (x !== ex || y !== ey || cout !== ec || flags.carry !== ec || flags.overflow !== ev ||
        flags.sign !== ex[7] || flags.zero !== (ex == 0)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s sel=%b a=%0d b=%0d cin=%b -> x=%0d y=%0d c=%b f=%b (exp x=%0d y=%0d c=%b v=%b)",
                 tag, sel, a, b, cin, x, y, cout, flags, ex, ey, ec, ev);
    end
  endtask

  logic [7:0] ref_x [8] = '{8'd0, 8'd7, 8'd1, 8'd12, 8'd5, 8'd4, 8'd8, 8'd2};

  initial begin
    a = 8'd4; b = 8'd3; cin = 1'b0;
    for (int i = 0; i < 8; i++) begin
      sel = 4'(i);
      #1;
      checks++;
      if (x !== ref_x[i]) begin
        failures++;
        $display("FAIL reference vector sel=%b x=%b expected %b", sel, x, ref_x[i]);
      end
    end
    for (int o = 0; o < 16; o++) begin
      for (int n = 0; n < 200; n++) begin
        sel = 4'(o);
        a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
        if (n == 0) a = 8'h7F;   // corner cases for overflow / increment
        if (n == 1) begin a = 8'h80; b = 8'h01; end
        if (n == 2) begin a = 8'hFF; b = 8'hFF; end
        #1;
        check("rand");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Arithmetic and logic unit: 16 operations on two 8-bit operands.
// The 4-bit select picks one operation:
//   0000 Clear   0001 A+B    0010 A-B    0011 A*B
//   0100 A++     0101 A      0110 A<<1   0111 A>>1
//   1000 OR      1001 AND    1010 NOT A  1011 XOR
//   1100 NOR     1101 NAND   1110 XNOR   1111 Preset
// The result is 16 bits wide: x is the low byte and y the high byte. y holds
// the upper product byte for A*B, all ones for Preset, and zero otherwise.
// The sub-units are the reversible adder/subtractor (A+B, A-B, A++), the
// multiplier, the shifter and the logic unit. A final multiplexer picks one
// result.
// The flags are carry, overflow, sign and zero. Carry and overflow come from
// the adder for A+B, A-B and A++ and are 0 for the other operations. Sign is
// x[7]; zero is (x == 0). cout equals the carry flag. cin is added into A+B
// only.
// The operation table follows the processor description. The y contents, the
// flag rules and cin are this design's choices. Combinational.
module alu
  import rev_proc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic [3:0]   sel,
  output logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         cout,
  output flags_t       flags
);
  alu_op_e op;
  assign op = alu_op_e'(sel);

  // Adder/subtractor operands
  logic [W-1:0] add_b, add_sum;
  logic         add_sub, add_cin, add_cout, add_ovf;
  always_comb begin
    add_b   = b;
    add_sub = 1'b0;
    add_cin = 1'b0;
    unique case (op)
      OP_ADD:  add_cin = cin;
      OP_SUB:  add_sub = 1'b1;
      OP_INC:  begin add_b = '0; add_cin = 1'b1; end
      default: ;
    endcase
  end

  rev_adder_sub #(.W(W)) u_addsub (
    .a(a), .b(add_b), .sub(add_sub), .cin(add_cin),
    .sum(add_sum), .cout(add_cout), .ovf(add_ovf)
  );

  logic [2*W-1:0] mul_p;
  rev_multiplier #(.W(W)) u_mul (.a(a), .b(b), .prod(mul_p));

  logic [W-1:0] sh_y;
  rev_shifter #(.W(W)) u_shift (.a(a), .right(sel[0]), .y(sh_y));

  logic [W-1:0] lu_y;
  rev_logic_unit #(.W(W)) u_logic (.a(a), .b(b), .op(sel[2:0]), .y(lu_y));

  logic arith;
  always_comb begin
    x     = '0;
    y     = '0;
    arith = 1'b0;
    unique case (op)
      OP_CLR:    x = '0;
      OP_ADD, OP_SUB, OP_INC: begin
        x     = add_sum;
        arith = 1'b1;
      end
      OP_MUL:    {y, x} = mul_p;
      OP_PASSA:  x = a;
      OP_SHL, OP_SHR: x = sh_y;
      OP_PRESET: begin x = '1; y = '1; end
      default:   x = lu_y;   // OR .. XNOR
    endcase
  end

  assign cout           = arith & add_cout;
  assign flags.carry    = cout;
  assign flags.overflow = arith & add_ovf;
  assign flags.sign     = x[W-1];
  assign flags.zero     = (x == '0);
endmodule

// Bitwise logic unit of the ALU, built from reversible gates.
// Per bit:
//   AND  = Toffoli(a, b, 0).R        NAND = Toffoli(a, b, 1).R
//   XOR  = Feynman(a, b).Q           XNOR = Feynman(a^b, 1).Q
//   OR   = Feynman(Peres(a, b, 0).Q, Peres(a, b, 0).R).Q  (a^b ^ a&b = a|b)
//   NOR  = Feynman(a|b, 1).Q         NOT  = Feynman(a, 1).Q
// op is the low three bits of the ALU select: 000 OR, 001 AND, 010 NOT,
// 011 XOR, 100 NOR, 101 NAND, 110 XNOR. Code 111 (Preset in the ALU) gives
// all ones here too. The operation list follows the processor description;
// the gate choice for each function is this design's own. Combinational.
// Gate outputs that nothing reads are the garbage outputs every reversible
// circuit produces. They are left unconnected on purpose.
module rev_logic_unit #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   op,
  output logic [W-1:0] y
);
  logic [W-1:0] f_and, f_nand, f_xor, f_xnor, f_or, f_nor, f_not;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic t1_p, t1_q, t2_p, t2_q, f1_p, f2_p, pg_p, pg_q, pg_r, f3_p, f4_p, f5_p;
    toffoli_gate u_and  (.a(a[i]), .b(b[i]), .c(1'b0), .p(t1_p), .q(t1_q), .r(f_and[i]));
    toffoli_gate u_nand (.a(a[i]), .b(b[i]), .c(1'b1), .p(t2_p), .q(t2_q), .r(f_nand[i]));
    feynman_gate u_xor  (.a(a[i]), .b(b[i]), .p(f1_p), .q(f_xor[i]));
    feynman_gate u_xnor (.a(f_xor[i]), .b(1'b1), .p(f2_p), .q(f_xnor[i]));
    peres_gate   u_pg   (.a(a[i]), .b(b[i]), .c(1'b0), .p(pg_p), .q(pg_q), .r(pg_r));
    feynman_gate u_or   (.a(pg_r), .b(pg_q), .p(f3_p), .q(f_or[i]));
    feynman_gate u_nor  (.a(f_or[i]), .b(1'b1), .p(f4_p), .q(f_nor[i]));
    feynman_gate u_not  (.a(a[i]), .b(1'b1), .p(f5_p), .q(f_not[i]));
  end

  always_comb begin
    unique case (op)
      3'b000:  y = f_or;
      3'b001:  y = f_and;
      3'b010:  y = f_not;
      3'b011:  y = f_xor;
      3'b100:  y = f_nor;
      3'b101:  y = f_nand;
      3'b110:  y = f_xnor;
      default: y = '1;
    endcase
  end
endmodule

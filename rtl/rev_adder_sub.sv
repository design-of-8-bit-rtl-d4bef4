// Ripple-carry adder/subtractor built from Peres and Feynman gates.
// Per bit, a Feynman gate XORs operand B with the sub control, which inverts B
// for subtraction. A full adder is two cascaded Peres gates:
//   PG1(a, b', 0) -> q = a^b', r = a&b'
//   PG2(a^b', c, a&b') -> q = sum, r = (a^b')&c ^ a&b' = carry out.
// The carry into bit 0 is sub | cin: A-B is A + ~B + 1, and cin only matters
// for addition. cout is the carry out of the top bit, so for A-B it is 1 when
// no borrow occurs. ovf is the signed overflow (carry into the top bit XOR
// carry out). Using Peres and Feynman gates follows the processor description;
// the gate arrangement, cin and the flag outputs are this design's choices.
// Combinational.
// Gate outputs that nothing reads are the garbage outputs every reversible
// circuit produces. They are left unconnected on purpose.
module rev_adder_sub #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         ovf
);
  logic [W:0]   c;
  logic [W-1:0] bx;

  assign c[0] = sub | cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic fg_p, pg1_p, pg1_q, pg1_r, pg2_p;
    feynman_gate u_fg  (.a(sub), .b(b[i]), .p(fg_p), .q(bx[i]));
    peres_gate   u_pg1 (.a(a[i]), .b(bx[i]), .c(1'b0), .p(pg1_p), .q(pg1_q), .r(pg1_r));
    peres_gate   u_pg2 (.a(pg1_q), .b(c[i]), .c(pg1_r), .p(pg2_p), .q(sum[i]), .r(c[i+1]));
  end

  assign cout = c[W];
  assign ovf  = c[W] ^ c[W-1];
endmodule

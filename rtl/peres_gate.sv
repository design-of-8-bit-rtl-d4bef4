// Peres gate (3x3), the cheapest universal 3x3 reversible gate (quantum cost 4).
// P = A, Q = A ^ B, R = A&B ^ C. With C = 0 it is a half adder: Q is the sum
// and R the carry. Two cascaded Peres gates make a full adder; the
// adder/subtractor is built that way. The multiplier also uses this gate to
// form partial products (R = A&B). Combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule

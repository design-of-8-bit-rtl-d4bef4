// Toffoli gate (3x3 controlled-controlled-NOT).
// P = A, Q = B, R = A&B ^ C. With C = 0 the gate gives A AND B. With C = 1 it
// gives A NAND B. The logic unit uses it for both. Combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule

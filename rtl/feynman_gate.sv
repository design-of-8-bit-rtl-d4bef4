// Feynman gate (2x2 controlled-NOT), the basic reversible gate.
// P = A, Q = A ^ B. With B tied to 0 it copies A (reversible fan-out).
// With B tied to 1 it inverts A. The equations are the standard ones for
// this gate. Purely combinational, with no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule

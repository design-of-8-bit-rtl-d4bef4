// Fredkin gate (3x3 controlled swap).
// P = A, Q = ~A&B ^ A&C, R = ~A&C ^ A&B: when the control A is 0, B and C pass
// straight through; when A is 1 they are swapped. This design uses it in two
// ways. As a 2:1 multiplexer, Q = A ? C : B. As a 1:2 demultiplexer, with
// C = 0, Q = ~A&B and R = A&B, which is the node of the decoder trees.
// Combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule

// One-bit left/right shifter built from a row of Fredkin-gate multiplexers.
// Each output bit i is a Fredkin gate used as a 2:1 multiplexer, with the
// direction as control. It selects a[i-1] (left shift) or a[i+1] (right
// shift); 0 is shifted in at the open end. Using reversible multiplexers
// follows the processor description. The shift distance of one and the zero
// fill are this design's choices. Combinational.
// Gate outputs that nothing reads are the garbage outputs every reversible
// circuit produces. They are left unconnected on purpose.
module rev_shifter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic         right,   // 0: shift left, 1: shift right
  output logic [W-1:0] y
);
  logic [W+1:0] ext;   // ext[i+1] = a[i], zero at both ends
  assign ext = {1'b0, a, 1'b0};

  for (genvar i = 0; i < W; i++) begin : g_mux
    logic frg_p, frg_r;
    // q = right ? a[i+1] : a[i-1]
    fredkin_gate u_frg (.a(right), .b(ext[i]), .c(ext[i+2]), .p(frg_p), .q(y[i]), .r(frg_r));
  end
endmodule

// N-to-2^N decoder with chip select, built from Fredkin gates.
// Each Fredkin gate has its third input tied to 0, which makes it a 1:2
// demultiplexer: the control input steers the incoming line to one of two
// outputs. The gates form a binary tree of 2^N-1 nodes. The root is fed by
// the chip select (the LOAD or ENABLE control line). Tree level l is steered
// by address bit N-1-l. Output y[k] is therefore high exactly when cs = 1 and
// sel = k; all outputs are low when cs = 0.
// Using Fredkin gates follows the processor description. The tree arrangement
// is this design's own choice. Fan-out of the address bits inside the tree is
// plain wiring. Combinational.
// Gate outputs that nothing reads are the garbage outputs every reversible
// circuit produces. They are left unconnected on purpose.
module rev_decoder #(
  parameter int unsigned N = 3
) (
  input  logic             cs,
  input  logic [N-1:0]     sel,
  output logic [2**N-1:0]  y
);
  localparam int unsigned NODES = 2**(N+1) - 1;

  // Heap-ordered tree: node j has children 2j+1 (control 0) and 2j+2 (control 1).
  logic [NODES-1:0] node;
  assign node[0] = cs;

  for (genvar l = 0; l < N; l++) begin : g_level
    for (genvar i = 0; i < 2**l; i++) begin : g_node
      localparam int unsigned J = 2**l - 1 + i;
      logic unused_p;
      fredkin_gate u_frg (
        .a (sel[N-1-l]),
        .b (node[J]),
        .c (1'b0),
        .p (unused_p),
        .q (node[2*J+1]),
        .r (node[2*J+2])
      );
    end
  end

  assign y = node[NODES-1 -: 2**N];
endmodule

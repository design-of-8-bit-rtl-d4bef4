// Unsigned W x W array multiplier built from Peres and HNG gates.
// A Peres gate with C = 0 forms each partial-product bit a[i]&b[j] on its R
// output. The rows are then summed one after another. Row j (j >= 1) adds the
// partial products a&b[j] to the running sum shifted right by one. Bit 0 of
// each row uses a Peres half adder; the other bits use HNG full adders (D = 0).
// The low bit of each row becomes product bit j. The last row's sum and carry
// form the upper half of the product. Using HNG and Peres gates follows the
// processor description; the array arrangement is this design's own.
// Combinational; the delay is about 2W full-adder stages.
// Gate outputs that nothing reads are the garbage outputs every reversible
// circuit produces. They are left unconnected on purpose.
module rev_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] prod
);
  // pp[j][i] = a[i] & b[j]
  logic [W-1:0] pp [W];
  for (genvar j = 0; j < W; j++) begin : g_pp_row
    for (genvar i = 0; i < W; i++) begin : g_pp_bit
      logic pg_p, pg_q;
      peres_gate u_pg (.a(a[i]), .b(b[j]), .c(1'b0), .p(pg_p), .q(pg_q), .r(pp[j][i]));
    end
  end

  // acc[j]: W-bit row sum after row j, with carry-out cy[j].
  logic [W-1:0] acc [W];
  logic [W-1:0] cy;
  assign acc[0] = pp[0];
  assign cy[0]  = 1'b0;
  assign prod[0] = pp[0][0];

  for (genvar j = 1; j < W; j++) begin : g_row
    logic [W-1:0] x;   // running sum shifted right by one
    logic [W:0]   c;
    assign x    = {cy[j-1], acc[j-1][W-1:1]};
    assign c[0] = 1'b0;
    for (genvar i = 0; i < W; i++) begin : g_add
      if (i == 0) begin : g_ha
        logic ha_p;
        peres_gate u_ha (.a(x[i]), .b(pp[j][i]), .c(1'b0), .p(ha_p), .q(acc[j][i]), .r(c[i+1]));
      end else begin : g_fa
        logic fa_p, fa_q;
        hng_gate u_fa (.a(x[i]), .b(pp[j][i]), .c(c[i]), .d(1'b0),
                       .p(fa_p), .q(fa_q), .r(acc[j][i]), .s(c[i+1]));
      end
    end
    assign cy[j]   = c[W];
    assign prod[j] = acc[j][0];
  end

  assign prod[2*W-1:W] = {cy[W-1], acc[W-1][W-1:1]};
endmodule
